// cmat_inv_fp: inverse of a complex 4x4 matrix by Cramer's rule, in
// floating point.
//
// This is the one floating-point unit of the hybrid fixed/floating scheme:
// the SNR beamformer needs the inverse of the observed-data correlation
// matrix, and fixed-point inversion is too inaccurate.  Following the
// document, the inverse is formed without pivoting:
//   1. every cofactor C_ij = (-1)^(i+j) det(minor_ij) is computed,
//   2. the determinant det = sum_j a_0j C_0j (Laplace expansion on row 0),
//   3. the transposed cofactor matrix is multiplied by 1/det.
// The only division is 1/det = conj(det) / |det|^2 (two real divisions).
//
// How it works: each 3x3 minor determinant is the signed sum of its 6
// permutation products; one product of three complex floating-point numbers
// is accumulated per clock.  Arithmetic is the reduced float of bf_pkg
// (IEEE-single layout, truncation, no subnormals).  The 4x4 size is the
// document's subband matrix size; the schedule is this design's.
//
// Interface: A is sampled on the clock where start is high; done pulses one
// clock when Ainv is valid (held until the next start).  singular is set
// with done when the determinant is zero (Ainv is then zero).
// Timing: 1 + 96 + 4 + 1 + 16 + 1 = 119 clocks from the start clock to done.
// singular means an exactly zero (or underflowed) |det|^2; a nearly
// singular matrix is not detected and gives a large, inaccurate inverse.
module cmat_inv_fp
  import bf_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  cfl_t A    [4][4],
  output cfl_t Ainv [4][4],
  output logic busy,
  output logic done,
  output logic singular
);

  typedef enum logic [2:0] {S_IDLE, S_COF, S_DET, S_RCP, S_SCL, S_DONE} state_t;
  state_t state;

  cfl_t a   [4][4];
  cfl_t cof [4][4];
  cfl_t acc, det, rdet;
  logic [1:0] ci, cj;
  logic [2:0] perm;

  // k-th index of {0,1,2,3} with 'skip' removed
  function automatic logic [1:0] other(input logic [1:0] skip, input logic [1:0] k);
    return (k < skip) ? k : k + 2'd1;
  endfunction

  // column order of each permutation of (0,1,2) and its sign
  logic [1:0] p0, p1, p2;
  logic       pneg;
  always_comb begin
    unique case (perm)
      3'd0: begin p0 = 2'd0; p1 = 2'd1; p2 = 2'd2; pneg = 1'b0; end
      3'd1: begin p0 = 2'd1; p1 = 2'd2; p2 = 2'd0; pneg = 1'b0; end
      3'd2: begin p0 = 2'd2; p1 = 2'd0; p2 = 2'd1; pneg = 1'b0; end
      3'd3: begin p0 = 2'd0; p1 = 2'd2; p2 = 2'd1; pneg = 1'b1; end
      3'd4: begin p0 = 2'd2; p1 = 2'd1; p2 = 2'd0; pneg = 1'b1; end
      default: begin p0 = 2'd1; p1 = 2'd0; p2 = 2'd2; pneg = 1'b1; end
    endcase
  end

  // one permutation product of the current minor
  cfl_t term, acc_next, cof_val;
  always_comb begin
    term = fc_mul(fc_mul(a[other(ci, 2'd0)][other(cj, p0)],
                         a[other(ci, 2'd1)][other(cj, p1)]),
                  a[other(ci, 2'd2)][other(cj, p2)]);
    if (pneg) begin
      term.re = fl_neg(term.re);
      term.im = fl_neg(term.im);
    end
    acc_next = fc_add(acc, term);
    cof_val  = acc_next;
    if (ci[0] ^ cj[0]) begin
      cof_val.re = fl_neg(acc_next.re);
      cof_val.im = fl_neg(acc_next.im);
    end
  end

  fl_t mag2;
  always_comb mag2 = fl_add(fl_mul(det.re, det.re), fl_mul(det.im, det.im));

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      done <= 1'b0; singular <= 1'b0;
      ci <= '0; cj <= '0; perm <= '0;
      acc <= '0; det <= '0; rdet <= '0;
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) begin
          a[r][c] <= '0; cof[r][c] <= '0; Ainv[r][c] <= '0;
        end
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          a <= A;
          ci <= '0; cj <= '0; perm <= '0; acc <= '0;
          state <= S_COF;
        end
        S_COF: begin
          if (perm == 3'd5) begin
            cof[ci][cj] <= cof_val;
            acc  <= '0;
            perm <= '0;
            cj   <= cj + 2'd1;
            if (cj == 2'd3) begin
              ci <= ci + 2'd1;
              if (ci == 2'd3) begin
                state <= S_DET;
                det   <= '0;
              end
            end
          end else begin
            acc  <= acc_next;
            perm <= perm + 3'd1;
          end
        end
        S_DET: begin
          det <= fc_add(det, fc_mul(a[0][cj], cof[0][cj]));
          cj  <= cj + 2'd1;
          if (cj == 2'd3) state <= S_RCP;
        end
        S_RCP: begin
          rdet.re <= fl_div(det.re, mag2);
          rdet.im <= fl_neg(fl_div(det.im, mag2));
          singular <= (mag2[30:23] == 8'd0);
          ci <= '0; cj <= '0;
          state <= S_SCL;
        end
        S_SCL: begin
          // inverse = adjugate / det, adjugate = transpose of cofactors
          Ainv[cj][ci] <= fc_mul(cof[ci][cj], rdet);
          cj <= cj + 2'd1;
          if (cj == 2'd3) begin
            ci <= ci + 2'd1;
            if (ci == 2'd3) state <= S_DONE;
          end
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) start |-> state == S_IDLE);

endmodule
