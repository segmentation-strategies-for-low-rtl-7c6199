// seg_fir: low-power FIR filter with coefficient segmentation.
//
// y[n] = sum_{k=0}^{N_TAPS-1} h_k * x[n-k], where every coefficient is split
// once, when it is loaded, into h_k = s_k + m_k: s_k is a signed power of two
// and m_k a small remainder. Per tap the sample x[n-k] is shifted by the
// exponent of s_k (a cheap barrel shift) and multiplied by m_k only. Because
// m_k is small and, in the two's complement case, never changes sign, the
// multiplier inputs toggle far less than with the raw coefficients, which is
// where the filter saves power. One multiplier, one shifter and one
// adder-subtractor/accumulator are shared by all taps under a controller:
//
//   coef_i -> coef_segmenter -> coef_memory[k]
//                                    |  m_k             |  s_k
//                                    v                  v
//   x_i -> data_memory --x[n-k]--> multiplier       barrel_shifter <-- x[n-k]
//                                    |  +/-             |  +/-
//                                    +-----> acc <------+
//                                             +--> y_o
//   fir_control: tap index k, data address of x[n-k], accumulator control.
//
// REPR chooses the number representation (see seg_pkg):
//   REPR_MIXED (default): two's complement samples, sign-magnitude m_k. The
//     magnitude of m_k drives a Baugh-Wooley two's complement multiplier and
//     the MSB of m_k selects add or subtract after it.
//   REPR_TWOS: two's complement samples and m_k (m_k >= 0), Baugh-Wooley
//     multiplier, products always added.
//   REPR_SIGNMAG: sign-magnitude samples (x_i is {sign, magnitude}) and m_k,
//     sign-magnitude array multiplier; the product sign selects add or
//     subtract, which converts it to two's complement in the accumulator.
// The representations, the segmentation, the multiplier types and the
// add/sub steered by the coefficient sign follow the design this filter
// implements; the shift path is added into the same accumulator cycle, and
// the controller, memories, handshakes and widths are this design's choices.
//
// Interface:
//   coef_we_i/coef_addr_i/coef_i load raw W-bit two's complement coefficient
//   h_k into tap coef_addr_i; accepted only while coef_ready_o is high (no
//   output is being computed). x_valid_i/x_ready_o is a valid/ready handshake
//   for one input sample x_i. y_valid_o pulses for one cycle with y_o, the
//   ACC_W-bit two's complement output; y_o holds its value until the first
//   tap of the next sample.
// Timing: a sample accepted at clock edge e0 gives y_valid_o in the cycle
// after edge e(N_TAPS); x_ready_o is high again in that cycle, so the filter
// takes one sample per N_TAPS+1 cycles. Reset (rst_n, active low,
// asynchronous) clears the sample store, the accumulator and the controller;
// coefficients must be loaded after reset and before the first sample.
module seg_fir
  import seg_pkg::*;
#(
  parameter int unsigned N_TAPS = 89,
  parameter int unsigned W      = 16,
  parameter repr_e       REPR   = REPR_MIXED,
  parameter int unsigned ACC_W  = 2 * W + $clog2(N_TAPS),
  localparam int unsigned AW    = (N_TAPS > 1) ? $clog2(N_TAPS) : 1,
  localparam int unsigned SW    = $clog2(W),
  localparam int unsigned CW    = coef_word_w(W, SW)
) (
  input  logic             clk,
  input  logic             rst_n,
  // coefficient load
  input  logic             coef_we_i,
  input  logic [AW-1:0]    coef_addr_i,
  input  logic [W-1:0]     coef_i,
  output logic             coef_ready_o,
  // input samples
  input  logic             x_valid_i,
  input  logic [W-1:0]     x_i,
  output logic             x_ready_o,
  // output samples
  output logic             y_valid_o,
  output logic [ACC_W-1:0] y_o
);

  // ---------------- coefficient segmentation and storage ----------------
  logic [W-1:0]  seg_m;
  logic [SW-1:0] seg_exp;
  logic          seg_neg;
  logic          seg_zero;
  logic [CW-1:0] cmem_wdata;
  logic [CW-1:0] cmem_rdata;
  logic [AW-1:0] cmem_raddr;

  coef_segmenter #(.W(W), .REPR(REPR)) u_seg (
    .h_i      (coef_i),
    .m_o      (seg_m),
    .s_exp_o  (seg_exp),
    .s_neg_o  (seg_neg),
    .s_zero_o (seg_zero)
  );

  assign cmem_wdata = {seg_zero, seg_neg, seg_exp, seg_m};

  coef_memory #(.N(N_TAPS), .CW(CW)) u_cmem (
    .clk     (clk),
    .we_i    (coef_we_i && coef_ready_o),
    .waddr_i (coef_addr_i),
    .wdata_i (cmem_wdata),
    .raddr_i (cmem_raddr),
    .rdata_o (cmem_rdata)
  );

  // ---------------- control ----------------
  logic          dmem_we;
  logic [AW-1:0] dmem_waddr;
  logic [AW-1:0] dmem_raddr;
  logic          acc_en;
  logic          acc_clear;

  fir_control #(.N(N_TAPS)) u_ctrl (
    .clk          (clk),
    .rst_n        (rst_n),
    .in_valid_i   (x_valid_i),
    .in_ready_o   (x_ready_o),
    .coef_ready_o (coef_ready_o),
    .dmem_we_o    (dmem_we),
    .dmem_waddr_o (dmem_waddr),
    .dmem_raddr_o (dmem_raddr),
    .cmem_raddr_o (cmem_raddr),
    .acc_en_o     (acc_en),
    .acc_clear_o  (acc_clear),
    .out_valid_o  (y_valid_o)
  );

  // ---------------- sample storage ----------------
  logic [W-1:0] xd;

  data_memory #(.N(N_TAPS), .W(W)) u_dmem (
    .clk     (clk),
    .rst_n   (rst_n),
    .we_i    (dmem_we),
    .waddr_i (dmem_waddr),
    .wdata_i (x_i),
    .raddr_i (dmem_raddr),
    .rdata_o (xd)
  );

  // ---------------- one tap: shift + multiply ----------------
  logic [W-1:0]  tap_m;
  logic [SW-1:0] tap_exp;
  logic          tap_neg;
  logic          tap_zero;

  assign {tap_zero, tap_neg, tap_exp, tap_m} = cmem_rdata;

  logic [ACC_W-1:0] prod_ext;
  logic             prod_sub;
  logic [ACC_W-1:0] shf_ext;
  logic             shf_sub;
  logic [2*W-2:0]   shifted;

  if (REPR == REPR_SIGNMAG) begin : g_sm
    logic [2*W-2:0] p_sm;

    sm_array_mult #(.W(W)) u_mult (
      .a_i (xd),
      .b_i (tap_m),
      .p_o (p_sm)
    );

    barrel_shifter #(.W(W), .SIGNED(1'b0)) u_shift (
      .d_i  ({1'b0, xd[W-2:0]}),
      .sh_i (tap_exp),
      .q_o  (shifted)
    );

    assign prod_ext = ACC_W'(p_sm[2*W-3:0]);
    assign prod_sub = p_sm[2*W-2];
    assign shf_ext  = tap_zero ? '0 : ACC_W'(shifted);
    assign shf_sub  = xd[W-1] ^ tap_neg;
  end else begin : g_tc
    logic [W-1:0]   mult_b;
    logic [2*W-1:0] p_tc;

    // Mixed mode: the multiplier sees the magnitude of m_k as a positive
    // two's complement number; its sign goes to the adder-subtractor.
    assign mult_b = (REPR == REPR_MIXED) ? {1'b0, tap_m[W-2:0]} : tap_m;

    baugh_wooley_mult #(.W(W)) u_mult (
      .a_i (xd),
      .b_i (mult_b),
      .p_o (p_tc)
    );

    barrel_shifter #(.W(W), .SIGNED(1'b1)) u_shift (
      .d_i  (xd),
      .sh_i (tap_exp),
      .q_o  (shifted)
    );

    assign prod_ext = ACC_W'($signed(p_tc));
    assign prod_sub = (REPR == REPR_MIXED) ? tap_m[W-1] : 1'b0;
    assign shf_ext  = tap_zero ? '0 : ACC_W'($signed(shifted));
    assign shf_sub  = tap_neg;
  end

  // ---------------- add/sub and accumulator ----------------
  add_sub_acc #(.ACC_W(ACC_W)) u_acc (
    .clk        (clk),
    .rst_n      (rst_n),
    .en_i       (acc_en),
    .clear_i    (acc_clear),
    .prod_i     (prod_ext),
    .prod_sub_i (prod_sub),
    .shf_i      (shf_ext),
    .shf_sub_i  (shf_sub),
    .acc_o      (y_o)
  );

endmodule
