// fft32: 32-point complex FFT / inverse FFT on 24-bit samples.
//
// This is the transform accelerator of the subband beamformer: each
// microphone block is taken to the frequency domain with it, and the
// beamformed subband outputs are taken back to the time domain with it.  The
// 32-point size and 24-bit word follow the document's profiling of a
// "24-bit FFT/IFFT (32pt)" kernel; the architecture below is this design's
// own, since the document does not describe the transform's insides.
//
// How it works: an in-place radix-2 decimation-in-time transform over a
// 32-entry register array.  Samples are written in bit-reversed order as they
// arrive, then 5 stages of 16 butterflies run, one butterfly per clock, then
// the 32 results are streamed out in natural order.  Twiddles are
// W^k = exp(-j*2*pi*k/32), k = 0..15, in Q2.22, taken from a quarter-wave
// table of cos(2*pi*k/32), k = 0..8; the inverse uses their conjugates.
//
// Scaling: the forward transform halves every butterfly output, so it
// returns FFT(x)/32 and cannot overflow.  The inverse does not scale (it
// saturates to the 24-bit range), so inverse(forward(x)) = x up to rounding.
//
// Interface: samples are Q1.23.  in_ready is high while the block waits for
// a new frame; the first accepted sample (in_valid && in_ready) also latches
// inv (0 forward, 1 inverse).  After 32 samples the block is busy for 80
// clocks, then raises out_valid for 32 consecutive clocks, bin/sample 0
// first, with no back-pressure.  Frame latency: 32 + 80 + 32 clocks.
module fft32
  import bf_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  logic inv,
  input  fft_t in_re,
  input  fft_t in_im,
  output logic out_valid,
  output fft_t out_re,
  output fft_t out_im
);

  localparam int unsigned NPT = 32;

  typedef enum logic [1:0] {S_LOAD, S_CALC, S_OUT} state_t;
  state_t state;

  fft_t mem_re [NPT];
  fft_t mem_im [NPT];
  logic [4:0] cnt;     // sample counter in S_LOAD / S_OUT, butterfly in S_CALC
  logic [2:0] stage;
  logic       inv_q;

  // quarter-wave cosine table, Q2.22: round(cos(2*pi*k/32) * 2^22)
  function automatic logic signed [23:0] qcos(input logic [3:0] k);
    case (k)
      4'd0: return 24'sd4194304;
      4'd1: return 24'sd4113712;
      4'd2: return 24'sd3875032;
      4'd3: return 24'sd3487436;
      4'd4: return 24'sd2965821;
      4'd5: return 24'sd2330230;
      4'd6: return 24'sd1605091;
      4'd7: return 24'sd818268;
      default: return 24'sd0;
    endcase
  endfunction

  // W^k for k = 0..15: re = cos, im = -sin
  logic signed [23:0] tw_re, tw_im;
  logic [3:0]         tw_k;

  always_comb begin
    if (tw_k <= 4'd8) begin
      tw_re = qcos(tw_k);
      tw_im = -qcos(4'd8 - tw_k);
    end else begin
      tw_re = -qcos(5'd16 - tw_k);
      tw_im = -qcos(tw_k - 4'd8);
    end
    if (inv_q) tw_im = -tw_im;
  end

  function automatic logic [4:0] bitrev5(input logic [4:0] a);
    return {a[0], a[1], a[2], a[3], a[4]};
  endfunction

  function automatic fft_t sat24(input logic signed [47:0] v);
    if (v > 48'sd8388607)       return 24'sh7f_ffff;
    else if (v < -48'sd8388608) return 24'sh80_0000;
    else                        return v[23:0];
  endfunction

  // butterfly addressing for (stage, cnt)
  logic [4:0] half, jj, i0, i1;
  logic [4:0] grp;
  always_comb begin
    half = 5'd1 << stage;
    jj   = cnt[3:0] & 5'(half - 5'd1);
    grp  = 5'(cnt[3:0] >> stage);
    i0   = 5'((grp << (stage + 3'd1)) | jj);
    i1   = i0 | half;
    tw_k = 4'(jj << (3'd4 - stage));
  end

  // butterfly datapath
  logic signed [47:0] a_re, a_im, b_re, b_im, t_re, t_im, s_re, s_im, d_re, d_im;
  fft_t y0_re, y0_im, y1_re, y1_im;
  always_comb begin
    a_re = mem_re[i0]; a_im = mem_im[i0];
    b_re = mem_re[i1]; b_im = mem_im[i1];
    t_re = (b_re * tw_re - b_im * tw_im) >>> 22;
    t_im = (b_re * tw_im + b_im * tw_re) >>> 22;
    s_re = a_re + t_re; s_im = a_im + t_im;
    d_re = a_re - t_re; d_im = a_im - t_im;
    if (!inv_q) begin
      s_re = s_re >>> 1; s_im = s_im >>> 1;
      d_re = d_re >>> 1; d_im = d_im >>> 1;
    end
    y0_re = sat24(s_re); y0_im = sat24(s_im);
    y1_re = sat24(d_re); y1_im = sat24(d_im);
  end

  assign in_ready  = (state == S_LOAD);
  assign out_valid = (state == S_OUT);
  assign out_re    = mem_re[cnt];
  assign out_im    = mem_im[cnt];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_LOAD;
      cnt   <= '0;
      stage <= '0;
      inv_q <= 1'b0;
      for (int i = 0; i < NPT; i++) begin
        mem_re[i] <= '0;
        mem_im[i] <= '0;
      end
    end else begin
      unique case (state)
        S_LOAD: if (in_valid) begin
          if (cnt == 5'd0) inv_q <= inv;
          mem_re[bitrev5(cnt)] <= in_re;
          mem_im[bitrev5(cnt)] <= in_im;
          cnt <= cnt + 5'd1;
          if (cnt == 5'd31) begin
            state <= S_CALC;
            stage <= '0;
          end
        end
        S_CALC: begin
          mem_re[i0] <= y0_re; mem_im[i0] <= y0_im;
          mem_re[i1] <= y1_re; mem_im[i1] <= y1_im;
          if (cnt == 5'd15) begin
            cnt <= '0;
            if (stage == 3'd4) state <= S_OUT;
            else               stage <= stage + 3'd1;
          end else begin
            cnt <= cnt + 5'd1;
          end
        end
        S_OUT: begin
          cnt <= cnt + 5'd1;
          if (cnt == 5'd31) state <= S_LOAD;
        end
        default: state <= S_LOAD;
      endcase
    end
  end

endmodule
