// ldpc_decoder: reconfigurable partial-parallel layered belief-propagation
// decoder for block-structured LDPC codes (IEEE 802.16e and 802.11n sizes).
//
// Datapath: the central L-memory holds one word of z LLRs per block column.
// For each pair of non-zero sub-matrices of the current layer (radix-4: two
// per cycle) two words are read, each rotated by a circular shifter so that
// lane i receives the message of check row i, and fed with the old extrinsic
// messages from the per-lane Lambda banks to z SISO lanes. The lanes return
// new Lambda and L messages, written back to the banks and the L-memory.
// Lanes and banks at or above z are disabled (no access, frozen state), which
// saves power on small codes. The early-termination unit watches the L writes.
//
// Interface:
//   configuration - code table (see ldpc_ctrl), z, nlayers, kinfo (information
//                   block columns), max_iter, et_en, et_thr; change only while
//                   idle.
//   llr_*         - channel LLRs, one block column (natural order) per write,
//                   while idle.
//   start/busy/done/iters - one frame; iters = iterations used.
//   hd_*          - hard decisions after decoding, one block column per cycle
//                   in natural order (1 = bit one), KB words.
//   stall         - a read waits for an outstanding write-back this cycle.
//   lane_en       - lanes in use (i < z).
// Timing: read at t, shifted words registered at t+1, SISO input at t+2,
// SISO output (and write-back) two or more cycles later. One pair of
// sub-matrices per cycle in steady state, so an iteration takes about E/2
// cycles plus dependency stalls, and a short drain where an early-termination
// test or the iteration limit is due.
// The structure (central L-memory, shifter, distributed SISOs and banks,
// power gating of unused lanes, early termination) follows the source design;
// word lengths, the pipeline registers and the interface are this design's.
module ldpc_decoder
  import ldpc_pkg::*;
#(
  parameter int unsigned ZM = Z_MAX
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // configuration
  input  logic                          cfg_pair_we,
  input  logic [PW-1:0]                 cfg_pair_addr,
  input  pair_t                         cfg_pair,
  input  logic                          cfg_layer_we,
  input  logic [LW-1:0]                 cfg_layer_addr,
  input  logic [$clog2(PMAX+1)-1:0]     cfg_layer_np,
  input  logic [ZW-1:0]                 z,
  input  logic [LW:0]                   nlayers,
  input  logic [CW:0]                   kinfo,
  input  logic [3:0]                    max_iter,
  input  logic                          et_en,
  input  amag_t                         et_thr,
  // channel LLRs
  input  logic                          llr_we,
  input  logic [CW-1:0]                 llr_col,
  input  logic [ZM-1:0][W-1:0]          llr_data,
  // frame control
  input  logic                          start,
  output logic                          busy,
  output logic                          done,
  output logic [3:0]                    iters,
  // hard decisions
  output logic                          hd_valid,
  output logic [CW-1:0]                 hd_col,
  output logic [ZM-1:0]                 hd_bits,
  // status
  output logic                          stall,
  output logic [ZM-1:0]                 lane_en
);
  // ---------------- controller ----------------
  logic [1:0]             rd_en;
  logic [1:0][CW-1:0]     rd_col;
  logic [1:0][ZW-1:0]     rd_r;
  logic                   iss_valid, iss_first, iss_last, iss_v1, iss_iter0;
  logic [PW-1:0]          iss_p;
  logic                   ob_valid;
  logic [CW-1:0]          ob_col;
  logic                   so_valid, so_last;
  logic [1:0][CW-1:0]     wb_col;
  logic                   wb_v1;
  logic [PW-1:0]          wb_p;
  logic                   et_snap, et_conv;

  ldpc_ctrl u_ctrl (
    .clk, .rst_n,
    .cfg_pair_we, .cfg_pair_addr, .cfg_pair,
    .cfg_layer_we, .cfg_layer_addr, .cfg_layer_np,
    .z, .nlayers, .max_iter, .et_en,
    .ld_we(llr_we), .ld_col(llr_col),
    .start, .busy, .done, .iters,
    .rd_en, .rd_col, .rd_r,
    .iss_valid, .iss_first, .iss_last, .iss_v1, .iss_p, .iss_iter0,
    .ob_valid, .ob_col,
    .so_valid, .so_last, .wb_col, .wb_v1, .wb_p,
    .et_snap, .et_converged(et_conv),
    .stall
  );

  always_comb
    for (int i = 0; i < ZM; i++) lane_en[i] = (i < int'(z));

  // ---------------- L-memory ----------------
  logic [1:0][ZM-1:0][WL-1:0] l_rdata, l_wdata, so_l;
  logic [ZM-1:0][WL-1:0]      llr_ext;
  logic [1:0]                l_we;
  logic [1:0][CW-1:0]        l_waddr;
  logic                      loading;

  assign loading = llr_we && !busy;
  always_comb begin
    l_we       = {so_valid && wb_v1, so_valid || loading};
    l_waddr    = so_valid ? wb_col : {wb_col[1], llr_col};
    for (int i = 0; i < ZM; i++) llr_ext[i] = {llr_data[i][W-1], llr_data[i]};
    l_wdata[0] = so_valid ? so_l[0] : llr_ext;
    l_wdata[1] = so_l[1];
  end

  l_memory #(.ZM(ZM)) u_lmem (
    .clk, .re(rd_en), .raddr(rd_col), .rdata(l_rdata),
    .we(l_we), .waddr(l_waddr), .wdata(l_wdata), .wmask(lane_en)
  );

  // ---------------- read pipeline stage 1: rotate ----------------
  logic [1:0][ZW-1:0]        r_d1;
  logic                      v_d1, f_d1, la_d1, v1_d1, i0_d1, ob_d1;
  logic [CW-1:0]             oc_d1;
  logic [1:0][ZM-1:0][WL-1:0] l_rot;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_d1 <= '0; v_d1 <= 1'b0; f_d1 <= 1'b0; la_d1 <= 1'b0; v1_d1 <= 1'b0;
      i0_d1 <= 1'b0; ob_d1 <= 1'b0; oc_d1 <= '0;
    end else begin
      r_d1  <= rd_r;
      v_d1  <= iss_valid;
      f_d1  <= iss_first;
      la_d1 <= iss_last;
      v1_d1 <= iss_v1;
      i0_d1 <= iss_iter0;
      ob_d1 <= ob_valid;
      oc_d1 <= ob_col;
    end
  end

  circ_shifter #(.ZM(ZM), .DW(WL)) u_shift0 (.z, .r(r_d1[0]), .din(l_rdata[0]), .dout(l_rot[0]));
  circ_shifter #(.ZM(ZM), .DW(WL)) u_shift1 (.z, .r(r_d1[1]), .din(l_rdata[1]), .dout(l_rot[1]));

  // ---------------- read pipeline stage 2: SISO input register ----------------
  logic [1:0][ZM-1:0][W-1:0] m_rdata;   // per pair slot, per lane
  logic [ZM-1:0][1:0][W-1:0] bank_rd;
  logic [1:0][ZM-1:0][WL-1:0] p_l;
  logic [1:0][ZM-1:0][W-1:0]  p_m;
  logic                      p_v, p_f, p_la, p_v1;

  always_comb
    for (int i = 0; i < ZM; i++) begin
      m_rdata[0][i] = i0_d1 ? '0 : bank_rd[i][0];
      m_rdata[1][i] = i0_d1 ? '0 : bank_rd[i][1];
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_v <= 1'b0; p_f <= 1'b0; p_la <= 1'b0; p_v1 <= 1'b0;
      hd_valid <= 1'b0; hd_col <= '0; hd_bits <= '0;
    end else begin
      p_v      <= v_d1;
      p_f      <= f_d1;
      p_la     <= la_d1;
      p_v1     <= v1_d1;
      hd_valid <= ob_d1;
      hd_col   <= oc_d1;
      if (ob_d1)
        for (int i = 0; i < ZM; i++) hd_bits[i] <= l_rot[0][i][WL-1];
    end
  end

  always_ff @(posedge clk)
    if (v_d1) begin
      p_l <= l_rot;
      p_m <= m_rdata;
    end

  // ---------------- SISO lanes and Lambda banks ----------------
  logic [ZM-1:0]             so_v, so_la, so_rdy;
  logic [1:0][ZM-1:0][W-1:0] so_m;

  for (genvar i = 0; i < ZM; i++) begin : g_lane
    logic unused_v1;
    siso_r4 u_siso (
      .clk, .rst_n, .en(lane_en[i]),
      .in_valid(p_v), .in_ready(so_rdy[i]), .in_first(p_f), .in_last(p_la), .in_v1(p_v1),
      .in_l0(p_l[0][i]), .in_l1(p_l[1][i]), .in_m0(p_m[0][i]), .in_m1(p_m[1][i]),
      .out_valid(so_v[i]), .out_last(so_la[i]), .out_v1(unused_v1),
      .out_m0(so_m[0][i]), .out_m1(so_m[1][i]), .out_l0(so_l[0][i]), .out_l1(so_l[1][i])
    );
    lambda_bank u_bank (
      .clk, .en(lane_en[i]),
      .re(iss_valid), .raddr(iss_p), .rdata(bank_rd[i]),
      .we(so_valid), .waddr(wb_p), .wdata({so_m[1][i], so_m[0][i]})
    );
  end

  assign so_valid = so_v[0];
  assign so_last  = so_la[0];

  // the controller's row credit keeps the lanes from ever refusing a pair
  assert property (@(posedge clk) disable iff (!rst_n) p_v |-> so_rdy[0]);

  // ---------------- early termination ----------------
  amag_t et_min;
  early_term #(.ZM(ZM)) u_et (
    .clk, .rst_n, .z, .kinfo, .thr(et_thr),
    .upd_we(l_we), .upd_col(l_waddr), .upd_data(l_wdata),
    .snap(et_snap), .converged(et_conv), .min_mag(et_min)
  );
endmodule
