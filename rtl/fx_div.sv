// fx_div: sequential signed Q12.20 divider, q = num / den.
//
// Used by the LS and SNR weight-update engines for their one reciprocal per
// step.  The document says only that a division is needed; this restoring
// divider is this design's own choice.  It works on magnitudes: the dividend
// |num| * 2^20 (52 bits) is divided by |den| one quotient bit per clock, then
// the sign is applied and the result saturated to the Q12.20 range.
// Division by zero returns the largest magnitude with the numerator's sign.
//
// Interface: pulse start with num/den valid; done pulses for one clock
// 53 clocks later with q valid (q holds until the next start).
module fx_div
  import bf_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fx_t  num,
  input  fx_t  den,
  output logic busy,
  output logic done,
  output fx_t  q
);

  localparam int unsigned NB = FX_W + FX_FRAC;   // 52 quotient bits

  logic [NB-1:0] dvd;      // remaining dividend bits, shifted out MSB first
  logic [FX_W:0] rem;      // partial remainder
  logic [FX_W-1:0] dvs;    // |den|
  logic [NB-1:0] quo;
  logic          neg;
  logic [5:0]    cnt;

  logic [FX_W:0] rem_sh, rem_sub;
  always_comb begin
    rem_sh  = {rem[FX_W-1:0], dvd[NB-1]};
    rem_sub = rem_sh - {1'b0, dvs};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; q <= '0;
      dvd <= '0; rem <= '0; dvs <= '0; quo <= '0; neg <= 1'b0; cnt <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1;
        dvd  <= {(num[FX_W-1] ? 32'(-num) : 32'(num)), {FX_FRAC{1'b0}}};
        dvs  <= den[FX_W-1] ? 32'(-den) : 32'(den);
        neg  <= num[FX_W-1] ^ den[FX_W-1];
        rem  <= '0;
        quo  <= '0;
        cnt  <= '0;
      end else if (busy) begin
        if (cnt == 6'(NB)) begin
          busy <= 1'b0;
          done <= 1'b1;
          if (dvs == '0)
            q <= neg ? FX_MIN : FX_MAX;
          else if (quo > NB'(32'h7fff_ffff))
            q <= neg ? FX_MIN : FX_MAX;
          else
            q <= neg ? -fx_t'(quo[FX_W-1:0]) : fx_t'(quo[FX_W-1:0]);
        end else begin
          dvd <= dvd << 1;
          if (!rem_sub[FX_W]) begin
            rem <= rem_sub;
            quo <= {quo[NB-2:0], 1'b1};
          end else begin
            rem <= rem_sh;
            quo <= {quo[NB-2:0], 1'b0};
          end
          cnt <= cnt + 6'd1;
        end
      end
    end
  end

endmodule
