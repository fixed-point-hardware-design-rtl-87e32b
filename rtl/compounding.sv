// compounding: coherent sum of one angle's frame K into the compounded frame C.
//
// K (Q1.14, scaling factor s_k) is read from the reconstruction block's
// local matrix; C (Q1.22, factor c_s_in) lives in an external memory and is
// updated in place. Both are brought to the common factor
// T = max(s_k, c_s_in + of_in) by rounding arithmetic right shifts, with K first
// widened to Q1.22, and added. If the previous call flagged an overflow
// (of_in), the stored C values may lie outside [-1, +1]; shifting them right
// by one and raising their factor by one keeps their value and restores the
// range. Each sum is saturated to the 24-bit word;
// whenever a sum leaves [-1, +1] the overflow flag of_out is raised so the next
// step (the next angle or the Hilbert block) halves C before using it. The
// new factor T is returned on c_s_out.
//
// The document names the inputs and outputs (C, C_s, OFflag) and says the
// two frames are aligned on the larger factor; the overflow threshold, the
// saturation and the one-bit compensation are this design's reading of
// "an overflow flag to indicate saturation after compounding, which allows us
// to compensate for it at the next computational step".
//
// C memory: word x*(NT_FFT/2) + k_z, separate read port (one cycle latency)
// and write port. One point per cycle; the pass over NT_FFT/2 * NX points
// ends with a 'done' pulse NT_FFT/2 * NX + 3 cycles after 'start', in the
// cycle after the last write. The K read column k_col is as wide as a
// spatial-FFT index (NX_FFT bins) but only counts to NX-1, so its top bit is
// always 0 at the default sizes.
module compounding
  import stolt_pkg::*;
#(
  parameter int unsigned NT_FFT = 4096,
  parameter int unsigned NX_FFT = 256,
  parameter int unsigned NX     = 128
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic busy,
  output logic done,
  input  scale_t s_k,
  input  scale_t c_s_in,
  input  logic   of_in,
  output scale_t c_s_out,
  output logic   of_out,
  // K read port into the local matrix
  output logic [$clog2(NT_FFT/2)-1:0]      k_row,
  output logic [$clog2(NX_FFT)-1:0]        k_col,
  input  logic signed [15:0]               k_re,
  input  logic signed [15:0]               k_im,
  // C memory
  output logic                             c_ren,
  output logic [$clog2(NT_FFT/2*NX)-1:0]   c_raddr,
  input  logic signed [23:0]               c_rq_re,
  input  logic signed [23:0]               c_rq_im,
  output logic                             c_we,
  output logic [$clog2(NT_FFT/2*NX)-1:0]   c_waddr,
  output logic signed [23:0]               c_wd_re,
  output logic signed [23:0]               c_wd_im
);
  localparam int unsigned NTH = NT_FFT / 2;
  localparam int unsigned TOT = NTH * NX;
  localparam int unsigned AW  = $clog2(TOT);
  localparam int unsigned LTH = $clog2(NTH);

  logic          run, v1, fin;
  logic [AW:0]   cnt;
  logic [AW-1:0] a1;
  scale_t        tgt, shc, shk;

  assign busy = run | v1 | fin;

  always_comb begin
    scale_t ce;
    ce  = c_s_in + scale_t'(of_in);
    tgt = max_scale(s_k, ce);
    shc = tgt - c_s_in;
    shk = tgt - s_k;
  end

  assign k_row   = LTH'(cnt[AW-1:0]);                  // k_z = cnt mod NTH
  assign k_col   = ($clog2(NX_FFT))'(cnt[AW-1:0] >> LTH);  // x = cnt / NTH
  assign c_ren   = run;
  assign c_raddr = cnt[AW-1:0];

  function automatic logic signed [23:0] sat24(input logic signed [25:0] v);
    if (v > 26'sd8388607)  return 24'sh7fffff;
    if (v < -26'sd8388608) return 24'sh800000;
    return 24'(v);
  endfunction

  logic signed [25:0] sum_re, sum_im;
  always_comb begin
    sum_re = 26'(sra_round(48'(c_rq_re), shc)) + 26'(sra_round(48'(k_re) <<< 8, shk));
    sum_im = 26'(sra_round(48'(c_rq_im), shc)) + 26'(sra_round(48'(k_im) <<< 8, shk));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; v1 <= 1'b0; fin <= 1'b0; cnt <= '0; done <= 1'b0;
      c_we <= 1'b0; of_out <= 1'b0; c_s_out <= '0;
    end else begin
      done <= fin;
      fin  <= 1'b0;
      c_we <= 1'b0;
      if (start && !busy) begin
        run     <= 1'b1;
        cnt     <= '0;
        of_out  <= 1'b0;
        c_s_out <= tgt;
      end else if (run) begin
        if (cnt == (AW+1)'(TOT - 1)) run <= 1'b0;
        cnt <= cnt + 1'b1;
      end
      v1 <= run;
      a1 <= cnt[AW-1:0];
      if (v1) begin
        c_we    <= 1'b1;
        c_waddr <= a1;
        c_wd_re <= sat24(sum_re);
        c_wd_im <= sat24(sum_im);
        if (sum_re > 26'sd4194304 || sum_re < -26'sd4194304 ||
            sum_im > 26'sd4194304 || sum_im < -26'sd4194304)
          of_out <= 1'b1;
        if (!run) fin <= 1'b1;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
endmodule
