// pos_div: sequential signed divider for the difference-over-sum ratio,
// q = num / den as a signed fixed-point fraction with FRAC fraction bits.
//
// The divider works on magnitudes. If |num| >= |den| the ratio lies outside
// the open interval (-1, 1) and the result saturates to +/-(1 - 2^-FRAC); a
// zero denominator gives q = 0 and raises sat as well. Otherwise a restoring
// long division produces one quotient bit per clock, most significant first,
// and the sign is applied at the end.
//
// Interface: clk, rst_n, start with num/den (sampled at start), busy, q,
// sat and done (one-clock pulse with the result).
// Timing: done FRAC+2 clocks after start (17 for FRAC = 15), one clock when
// the result saturates; a new start is
// accepted when busy is low.
// Following the document: equation (7), X = V_delta / V_sigma. Own choices:
// the fixed-point format, saturation and the bit-serial structure.
module pos_div #(
  parameter int unsigned W    = 32,
  parameter int unsigned FRAC = 15
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic signed [W-1:0]  num,
  input  logic signed [W-1:0]  den,
  output logic                 busy,
  output logic signed [FRAC:0] q,
  output logic                 sat,
  output logic                 done
);
  localparam int unsigned CW = $clog2(FRAC + 1);

  logic [W:0]      rem, dv;          // one guard bit for the shift
  logic [FRAC-1:0] qm;
  logic            neg;
  logic [CW-1:0]   bitn;
  logic            fin;              // last step done, sign not yet applied
  logic [W:0]      anum, aden, rem2;

  assign anum = num[W-1] ? (W+1)'(-num) : (W+1)'(num);
  assign aden = den[W-1] ? (W+1)'(-den) : (W+1)'(den);
  assign rem2 = {rem[W-1:0], 1'b0};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem  <= '0;
      dv   <= '0;
      qm   <= '0;
      neg  <= 1'b0;
      bitn <= '0;
      busy <= 1'b0;
      fin  <= 1'b0;
      q    <= '0;
      sat  <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      fin  <= 1'b0;
      if (start && !busy) begin
        neg <= num[W-1] ^ den[W-1];
        if (aden == '0) begin
          q    <= '0;
          sat  <= 1'b1;
          done <= 1'b1;
        end else if (anum >= aden) begin
          q    <= (num[W-1] ^ den[W-1]) ? -(FRAC+1)'({1'b0, {FRAC{1'b1}}})
                                        :  (FRAC+1)'({1'b0, {FRAC{1'b1}}});
          sat  <= 1'b1;
          done <= 1'b1;
        end else begin
          rem  <= anum;
          dv   <= aden;
          qm   <= '0;
          bitn <= CW'(FRAC - 1);
          busy <= 1'b1;
          sat  <= 1'b0;
        end
      end else if (busy) begin
        if (rem2 >= dv) begin
          rem <= rem2 - dv;
          qm  <= {qm[FRAC-2:0], 1'b1};
        end else begin
          rem <= rem2;
          qm  <= {qm[FRAC-2:0], 1'b0};
        end
        if (bitn == '0) begin
          busy <= 1'b0;
          fin  <= 1'b1;
        end else begin
          bitn <= bitn - 1'b1;
        end
      end
      if (fin) begin
        q    <= neg ? -(FRAC+1)'({1'b0, qm}) : (FRAC+1)'({1'b0, qm});
        done <= 1'b1;
      end
    end
  end
endmodule
