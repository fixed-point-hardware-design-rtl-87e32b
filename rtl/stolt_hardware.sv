// stolt_hardware: fixed-point plane-wave Stolt migration accelerator, one
// call per emission angle.
//
// Coherent plane-wave compounding builds an ultrasound image from several
// tilted plane-wave shots. Instead of delay-and-sum beamforming, this design
// migrates each shot in the Fourier domain: a 2-D FFT of the raw echoes, a
// remapping of the temporal-frequency axis onto the depth-wavenumber axis
// (Stolt's method extended to tilted plane waves), an inverse spatial FFT
// and a per-angle phase rotation. The migrated spectra of all angles are
// summed (compounded), and after the last angle an inverse FFT along depth
// yields the analytic-signal image H and its envelope |H|.
//
// A call (start pulse) runs
//   reconstruction -> compounding -> hilbert (only if last_flag)
// and ends with a done pulse. All large arrays stay in memories outside the
// block and are reached through synchronous ports with one cycle of read
// latency:
//   P   raw RF frame, word x*NT_FFT + t, Q1.14 (two read ports)
//   M,A remap position (unsigned Q12.12, bins) and scaler (Q1.14), shared
//       address g*(NT_FFT/2) + k_z, g = 0..NX_FFT/2
//   R   per-element phase increment along k_z, Q3.12 in units of pi
//   C   compounded half-spectrum, word x*(NT_FFT/2) + k_z, Q1.22 (read port
//       and write port), read and updated in place on every call
//   H   three planes Re, Im, Abs, word x*NT_FFT + z, Q1.22 (write enables
//       per plane, one read port for Re/Im)
// Every value is a fixed-point number in [-1, +1] times 2^s. The caller
// passes the compounded frame's factor c_s_in and overflow flag of_in from
// the previous call (both 0 with C cleared for the first angle) and gets the
// new c_s_out/of_out back; after the last angle h_s_out is the factor of H.
//
// The split into these three blocks, the argument list, the word formats and
// the per-call protocol follow the document's fixed-point design; the
// memory port protocol, the start/done handshake and the NZ default are this
// design's choices.
module stolt_hardware
  import stolt_pkg::*;
#(
  parameter int unsigned NT_FFT = 4096,   // temporal FFT size
  parameter int unsigned NX_FFT = 256,    // spatial FFT size
  parameter int unsigned NX     = 128,    // transducer elements
  parameter int unsigned NZ     = 2048,   // output depth samples
  parameter int unsigned NITER  = 14      // CORDIC iterations
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  logic   last_flag,
  input  scale_t c_s_in,
  input  logic   of_in,
  output logic   busy,
  output logic   done,
  output scale_t c_s_out,
  output logic   of_out,
  output scale_t h_s_out,
  output logic [3:0] rec_step,     // reconstruction step (observation)
  output logic [3:0] active,       // {hilbert FFT, hilbert, compounding, reconstruction} busy
  // P
  output logic                                     p_en,
  output logic [$clog2(NT_FFT*NX)-1:0]             p_addr_a,
  output logic [$clog2(NT_FFT*NX)-1:0]             p_addr_b,
  input  logic signed [15:0]                       p_q_a,
  input  logic signed [15:0]                       p_q_b,
  // M and A
  output logic                                     ma_en,
  output logic [$clog2(NT_FFT/2*(NX_FFT/2+1))-1:0] ma_addr,
  input  logic [23:0]                              m_q,
  input  logic signed [15:0]                       a_q,
  // R
  output logic                                     r_en,
  output logic [$clog2(NX)-1:0]                    r_addr,
  input  logic signed [15:0]                       r_q,
  // C
  output logic                                     c_ren,
  output logic [$clog2(NT_FFT/2*NX)-1:0]           c_raddr,
  input  logic signed [23:0]                       c_rq_re,
  input  logic signed [23:0]                       c_rq_im,
  output logic                                     c_we,
  output logic [$clog2(NT_FFT/2*NX)-1:0]           c_waddr,
  output logic signed [23:0]                       c_wd_re,
  output logic signed [23:0]                       c_wd_im,
  // H
  output logic [2:0]                               h_we,
  output logic [$clog2(NT_FFT*NX)-1:0]             h_waddr,
  output logic signed [23:0]                       h_wd_re,
  output logic signed [23:0]                       h_wd_im,
  output logic [23:0]                              h_wd_abs,
  output logic                                     h_ren,
  output logic [$clog2(NT_FFT*NX)-1:0]             h_raddr,
  input  logic signed [23:0]                       h_rq_re,
  input  logic signed [23:0]                       h_rq_im
);
  typedef enum logic [2:0] {T_IDLE, T_REC, T_CMP, T_HIL, T_FIN} tstate_t;
  tstate_t state;

  logic   rec_start, rec_busy, rec_done;
  logic   cmp_start, cmp_busy, cmp_done;
  logic   hil_start, hil_busy, hil_done, hil_fft_busy;
  scale_t s_k, cmp_cs;
  logic   cmp_of;
  logic   last_r;

  logic [$clog2(NT_FFT/2)-1:0] k_row;
  logic [$clog2(NX_FFT)-1:0]   k_col;
  logic signed [15:0]          k_re, k_im;

  logic                                  cmp_ren, hil_ren;
  logic [$clog2(NT_FFT/2*NX)-1:0]        cmp_raddr, hil_raddr;

  reconstruction #(.NT_FFT(NT_FFT), .NX_FFT(NX_FFT), .NX(NX), .NITER(NITER)) u_rec (
    .clk, .rst_n, .start(rec_start), .busy(rec_busy), .done(rec_done), .s_k,
    .stage_o(rec_step),
    .p_en, .p_addr_a, .p_addr_b, .p_q_a, .p_q_b,
    .ma_en, .ma_addr, .m_q, .a_q,
    .r_en, .r_addr, .r_q,
    .k_row, .k_col, .k_re, .k_im);

  compounding #(.NT_FFT(NT_FFT), .NX_FFT(NX_FFT), .NX(NX)) u_cmp (
    .clk, .rst_n, .start(cmp_start), .busy(cmp_busy), .done(cmp_done),
    .s_k, .c_s_in, .of_in, .c_s_out(cmp_cs), .of_out(cmp_of),
    .k_row, .k_col, .k_re, .k_im,
    .c_ren(cmp_ren), .c_raddr(cmp_raddr), .c_rq_re, .c_rq_im,
    .c_we, .c_waddr, .c_wd_re, .c_wd_im);

  hilbert #(.NT_FFT(NT_FFT), .NX(NX), .NZ(NZ)) u_hil (
    .clk, .rst_n, .start(hil_start), .busy(hil_busy), .done(hil_done),
    .c_s_in(cmp_cs), .of_in(cmp_of), .h_s(h_s_out), .fft_busy(hil_fft_busy),
    .c_ren(hil_ren), .c_raddr(hil_raddr), .c_rq_re, .c_rq_im,
    .h_we, .h_waddr, .h_wd_re, .h_wd_im, .h_wd_abs,
    .h_ren, .h_raddr, .h_rq_re, .h_rq_im);

  // C read port belongs to the hilbert block while it runs.
  assign c_ren   = (state == T_HIL) ? hil_ren   : cmp_ren;
  assign c_raddr = (state == T_HIL) ? hil_raddr : cmp_raddr;

  assign busy    = (state != T_IDLE);
  assign active  = {hil_fft_busy, hil_busy, cmp_busy, rec_busy};
  assign c_s_out = cmp_cs;
  assign of_out  = cmp_of;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= T_IDLE;
      rec_start <= 1'b0;
      cmp_start <= 1'b0;
      hil_start <= 1'b0;
      done      <= 1'b0;
      last_r    <= 1'b0;
    end else begin
      rec_start <= 1'b0;
      cmp_start <= 1'b0;
      hil_start <= 1'b0;
      done      <= 1'b0;
      unique case (state)
        T_IDLE: if (start) begin
          state     <= T_REC;
          rec_start <= 1'b1;
          last_r    <= last_flag;
        end
        T_REC: if (rec_done) begin
          state     <= T_CMP;
          cmp_start <= 1'b1;
        end
        T_CMP: if (cmp_done) begin
          if (last_r) begin
            state     <= T_HIL;
            hil_start <= 1'b1;
          end else state <= T_FIN;
        end
        T_HIL: if (hil_done) state <= T_FIN;
        T_FIN: begin
          done  <= 1'b1;
          state <= T_IDLE;
        end
        default: state <= T_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) start |-> state == T_IDLE);
endmodule
