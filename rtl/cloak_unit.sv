// cloak_unit: speculative memory cloaking and bypassing for an out-of-order core.
//
// Most loads read a value written by a recent store. Instead of waiting for
// address calculation, disambiguation and a cache access, this unit predicts
// which store a load depends on and lets the value flow through a synonym:
// a small name shared by the dependent store and load.
//
//  * Request (cycle t, d_*): up to LANES decoded instructions in program order.
//    Loads and stores look up the DPNT by PC for a prediction and a synonym.
//  * Response (cycle t+1, r_*): a predicted store creates a new, empty version
//    of its synonym in the SF and maps the synonym in the SRT to its
//    reservation station and to the name of its source register. A predicted
//    load looks up the SRT: if its store is still in flight the load is
//    bypassed (r_src = SRC_BYPASS): r_spec_tag names the register where the
//    store's producer puts the value, and the load's destination register
//    gets that speculative name, reported on r_src_spec_* of later readers.
//    Otherwise a full SF entry supplies the value directly (SRC_SF).
//    r_predict says whether the predictor allows the value to be used; when it
//    does not, the value can still be checked (shadow).
//  * Verification (v_* -> o_*, one cycle): the load's memory value is compared
//    with its speculative value; consumers are told to re-execute only if they
//    used a wrong value.
//  * Commit (c_*): a cloaked store writes its value into the SF and releases
//    its SRT mapping; stores record their address in the DDT; loads probe the
//    DDT for the store that last wrote their word. In the same cycle each
//    load's detected dependence and verification outcome train the DPNT
//    (one update port per lane, applied in program order).
//
// Sizes default to the evaluated configuration: 4K-entry 2-way DPNT, 1K-entry
// 2-way SF, 128-entry fully associative DDT, 128-entry SRT, 4 accesses per
// cycle. Widths, the stage timing, the choice of bypassing whenever
// the store is in flight, and flush handling are this design's own.
// flush (a pipeline squash) drops the decode stage, all SRT mappings and all
// speculative register names.
module cloak_unit
  import cloak_pkg::*;
#(
  parameter int unsigned LANES        = 4,
  parameter int unsigned DPNT_ENTRIES = 4096,
  parameter int unsigned DPNT_WAYS    = 2,
  parameter int unsigned SF_ENTRIES   = 1024,
  parameter int unsigned SF_WAYS      = 2,
  parameter int unsigned DDT_ENTRIES  = 128,
  parameter int unsigned SRT_ENTRIES  = 128,
  parameter int unsigned PC_W         = 32,
  parameter int unsigned ADDR_W       = 32,
  parameter int unsigned DATA_W       = 32,
  parameter int unsigned SYN_W        = 12,
  parameter int unsigned RS_W         = 7,
  parameter int unsigned PTAG_W       = 7,
  parameter int unsigned NREG         = 32,
  localparam int unsigned REG_W       = $clog2(NREG)
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              flush,
  // decode request
  input  logic [LANES-1:0]                  d_valid,
  input  op_e  [LANES-1:0]                  d_op,
  input  logic [LANES-1:0][PC_W-1:0]        d_pc,
  input  logic [LANES-1:0][RS_W-1:0]        d_rs,
  input  logic [LANES-1:0][PTAG_W-1:0]      d_src_ptag,
  input  logic [LANES-1:0]                  d_has_dst,
  input  logic [LANES-1:0][REG_W-1:0]       d_dst_reg,
  input  logic [LANES-1:0][1:0][REG_W-1:0]  d_src_reg,
  // decode response, one cycle later
  output logic [LANES-1:0]                  r_valid,
  output op_e  [LANES-1:0]                  r_op,
  output logic [LANES-1:0]                  r_has_syn,
  output logic [LANES-1:0]                  r_predict,
  output logic [LANES-1:0][SYN_W-1:0]       r_syn,
  output logic [LANES-1:0]                  r_srt_ok,
  output pred_src_e [LANES-1:0]             r_src,
  output logic [LANES-1:0][DATA_W-1:0]      r_value,
  output logic [LANES-1:0][RS_W-1:0]        r_rs,
  output logic [LANES-1:0][PTAG_W-1:0]      r_spec_tag,
  output logic [LANES-1:0][1:0]             r_src_spec_valid,
  output logic [LANES-1:0][1:0][PTAG_W-1:0] r_src_spec_tag,
  // verification
  input  logic [LANES-1:0]                  v_valid,
  input  vkind_e [LANES-1:0]                v_kind,
  input  logic [LANES-1:0][DATA_W-1:0]      v_spec,
  input  logic [LANES-1:0][DATA_W-1:0]      v_mem,
  input  logic [LANES-1:0]                  v_consumed,
  output logic [LANES-1:0]                  o_valid,
  output outcome_e [LANES-1:0]              o_outcome,
  output logic [LANES-1:0]                  o_mispec,
  // commit
  input  logic [LANES-1:0]                  c_valid,
  input  op_e  [LANES-1:0]                  c_op,
  input  logic [LANES-1:0][PC_W-1:0]        c_pc,
  input  logic [LANES-1:0][ADDR_W-1:0]      c_addr,
  input  logic [LANES-1:0][DATA_W-1:0]      c_value,
  input  logic [LANES-1:0]                  c_cloaked,
  input  logic [LANES-1:0][SYN_W-1:0]       c_syn,
  input  logic [LANES-1:0][RS_W-1:0]        c_rs,
  input  outcome_e [LANES-1:0]              c_outcome,
  // events
  output logic [LANES-1:0]                  ev_dep_detect,
  output logic [LANES-1:0]                  ev_new_syn,
  output logic [LANES-1:0]                  ev_merge
);
  // ------------------------------------------------------------ DPNT lookup
  logic [LANES-1:0]            lk_hit, lk_predict;
  logic [LANES-1:0][SYN_W-1:0] lk_syn;

  logic [LANES-1:0]           up_valid;
  outcome_e [LANES-1:0]       up_outcome;
  logic [LANES-1:0]           dep_found;
  logic [LANES-1:0][PC_W-1:0] dep_stpc;

  dpnt #(.ENTRIES(DPNT_ENTRIES), .WAYS(DPNT_WAYS), .LANES(LANES), .PC_W(PC_W), .SYN_W(SYN_W)) u_dpnt (
    .clk, .rst_n,
    .lk_pc(d_pc), .lk_hit, .lk_predict, .lk_syn,
    .up_valid, .up_ld_pc(c_pc), .up_dep(dep_found), .up_st_pc(dep_stpc), .up_outcome,
    .ev_new_syn, .ev_merge
  );

  // ------------------------------------------------------------ decode stage register
  logic [LANES-1:0]                 s_valid, s_hit, s_pred, s_has_dst;
  op_e  [LANES-1:0]                 s_op;
  logic [LANES-1:0][SYN_W-1:0]      s_syn;
  logic [LANES-1:0][RS_W-1:0]       s_rs;
  logic [LANES-1:0][PTAG_W-1:0]     s_ptag;
  logic [LANES-1:0][REG_W-1:0]      s_dst;
  logic [LANES-1:0][1:0][REG_W-1:0] s_src;

  always_ff @(posedge clk) begin
    if (!rst_n || flush) begin
      s_valid <= '0;
    end else begin
      s_valid <= d_valid;
    end
    for (int l = 0; l < LANES; l++) begin
      s_op[l]      <= d_op[l];
      s_hit[l]     <= lk_hit[l] && d_op[l] != OP_OTHER;
      s_pred[l]    <= lk_predict[l] && d_op[l] != OP_OTHER;
      s_syn[l]     <= lk_syn[l];
      s_rs[l]      <= d_rs[l];
      s_ptag[l]    <= d_src_ptag[l];
      s_has_dst[l] <= d_has_dst[l];
      s_dst[l]     <= d_dst_reg[l];
      s_src[l]     <= d_src_reg[l];
    end
  end

  // ------------------------------------------------------------ SRT / SF at rename
  logic [LANES-1:0] st_pred, ld_look;
  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      st_pred[l] = s_valid[l] && s_op[l] == OP_STORE && s_pred[l] && !flush;
      ld_look[l] = s_valid[l] && s_op[l] == OP_LOAD && s_hit[l];
    end
  end

  logic [LANES-1:0]              srt_hit;
  logic [LANES-1:0][RS_W-1:0]    srt_rs;
  logic [LANES-1:0][PTAG_W-1:0]  srt_ptag;
  logic [LANES-1:0]              sf_hit, sf_full;
  logic [LANES-1:0][DATA_W-1:0]  sf_data;
  logic [LANES-1:0]              c_st, c_cl, c_mem;

  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      c_st[l]  = c_valid[l] && c_op[l] == OP_STORE;
      c_cl[l]  = c_st[l] && c_cloaked[l];
      c_mem[l] = c_valid[l] && c_op[l] != OP_OTHER;
    end
  end

  srt #(.ENTRIES(SRT_ENTRIES), .LANES(LANES), .SYN_W(SYN_W), .RS_W(RS_W), .PTAG_W(PTAG_W)) u_srt (
    .clk, .rst_n, .flush,
    .al_valid(st_pred), .al_syn(s_syn), .al_rs(s_rs), .al_ptag(s_ptag), .al_ok(r_srt_ok),
    .lk_valid(ld_look), .lk_syn(s_syn), .lk_hit(srt_hit), .lk_rs(srt_rs), .lk_ptag(srt_ptag),
    .rl_valid(c_cl), .rl_syn(c_syn), .rl_rs(c_rs)
  );

  sf #(.ENTRIES(SF_ENTRIES), .WAYS(SF_WAYS), .LANES(LANES), .SYN_W(SYN_W), .DATA_W(DATA_W)) u_sf (
    .clk, .rst_n,
    .al_valid(st_pred), .al_syn(s_syn),
    .wr_valid(c_cl), .wr_syn(c_syn), .wr_data(c_value),
    .rd_valid(ld_look), .rd_syn(s_syn), .rd_hit(sf_hit), .rd_full(sf_full), .rd_data(sf_data)
  );

  logic [LANES-1:0] set_spec;
  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      r_valid[l]    = s_valid[l];
      r_op[l]       = s_op[l];
      r_has_syn[l]  = s_valid[l] && s_hit[l];
      r_syn[l]      = s_syn[l];
      r_src[l]      = SRC_NONE;
      r_value[l]    = '0;
      r_rs[l]       = '0;
      r_spec_tag[l] = '0;
      if (ld_look[l]) begin
        if (srt_hit[l]) begin
          r_src[l]      = SRC_BYPASS;
          r_rs[l]       = srt_rs[l];
          r_spec_tag[l] = srt_ptag[l];
        end else if (sf_hit[l] && sf_full[l]) begin
          r_src[l]   = SRC_SF;
          r_value[l] = sf_data[l];
        end
      end
      r_predict[l] = st_pred[l] ||
                     (ld_look[l] && s_pred[l] && r_src[l] != SRC_NONE);
      set_spec[l]  = r_predict[l] && s_op[l] == OP_LOAD && r_src[l] == SRC_BYPASS;
    end
  end

  spec_name_map #(.NREG(NREG), .LANES(LANES), .PTAG_W(PTAG_W)) u_map (
    .clk, .rst_n, .flush,
    .valid(s_valid), .has_dst(s_has_dst), .dst_reg(s_dst),
    .set_spec, .spec_tag(srt_ptag), .src_reg(s_src),
    .src_spec_valid(r_src_spec_valid), .src_spec_tag(r_src_spec_tag)
  );

  // ------------------------------------------------------------ verification
  verify_unit #(.LANES(LANES), .DATA_W(DATA_W)) u_verify (
    .clk, .rst_n, .v_valid, .v_kind, .v_spec, .v_mem, .v_consumed,
    .o_valid, .o_outcome, .o_mispec
  );

  // ------------------------------------------------------------ commit: DDT
  logic [LANES-1:0]           c_is_store;
  always_comb begin
    for (int l = 0; l < LANES; l++) c_is_store[l] = c_op[l] == OP_STORE;
  end

  ddt #(.ENTRIES(DDT_ENTRIES), .LANES(LANES), .ADDR_W(ADDR_W), .PC_W(PC_W)) u_ddt (
    .clk, .rst_n, .c_valid(c_mem), .c_is_store, .c_addr, .c_pc,
    .dep_found, .dep_stpc
  );
  assign ev_dep_detect = dep_found;

  // ------------------------------------------------------------ DPNT update
  // Each committing load trains the DPNT in the same cycle: its detected
  // dependence, if any, and the outcome of its own verification.
  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      up_valid[l]   = c_valid[l] && c_op[l] == OP_LOAD && (dep_found[l] || c_outcome[l] != OUT_NONE);
      up_outcome[l] = c_outcome[l];
    end
  end

  // Only stores can carry a synonym version to commit.
  always @(posedge clk) begin
    for (int l = 0; l < LANES; l++) begin
      if (rst_n && c_valid[l] && c_cloaked[l])
        assert (c_op[l] == OP_STORE) else $error("lane %0d: cloaked commit that is not a store", l);
    end
  end

endmodule
