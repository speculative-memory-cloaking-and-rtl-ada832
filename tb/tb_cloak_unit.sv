// tb_cloak_unit: end-to-end test of the cloaking / bypassing unit at its
// default sizes (4K-entry DPNT, 1K-entry SF, 128-entry DDT and SRT, 4 lanes).
//
// The testbench plays the host core. It generates a program as repeated
// iterations of a loop body and computes every load's architecturally correct
// value in program order. It decodes 4 instructions per cycle, takes the
// unit's response one cycle later, verifies each load 4 cycles after decode
// (speculative value against the correct value) and commits each group 6
// cycles after decode, so about 24 instructions are in flight.
// The loop body holds one kernel per mechanism:
//   NEAR   DEF; store A[i]; load A[i]; USE   -> store in flight: bypassing,
//          and USE must see the DEF's name as a speculative source name
//   FAR    store B ... 59 instructions ... load B -> store committed: value
//          from the synonym file
//   ALT    store C by one of two stores, alternating -> two producers share
//          one synonym through the load
//   MERGE  store1->load1 and store2->load2, every 4th iteration store1->load2
//          -> two synonyms merged into the smaller
//   MIS    the producing store sometimes writes another word -> wrong values,
//          the predictor backs off and recovers after 2 correct checks
//   BURST  one store read by 28 loads -> up to 4 DPNT updates per cycle
// Midway a flush squashes everything in flight and decoding restarts from the
// oldest squashed instruction.
// Checks: response latency of exactly one cycle; the verify outcome and the
// consumer notification of every load; no wrong used value in the stable
// kernels after warm-up and at least half of their loads covered; bypass
// names; and every mechanism above seen at least once.
module tb_cloak_unit;
  import cloak_pkg::*;
  localparam int unsigned L     = 4;
  localparam int          NITER = 160;
  localparam int          BODY  = 69;
  localparam int          DEC2VER = 4, DEC2COM = 6;
  localparam int          WARM  = 20;

  typedef enum int {K_FILL, K_NEAR, K_FAR, K_ALT, K_MERGE, K_MIS, K_BURST, K_NK} kern_e;

  logic clk = 1'b0, rst_n = 1'b0, flush = 1'b0;
  logic [L-1:0]                  d_valid, d_has_dst;
  op_e  [L-1:0]                  d_op;
  logic [L-1:0][31:0]            d_pc;
  logic [L-1:0][6:0]             d_rs, d_src_ptag;
  logic [L-1:0][4:0]             d_dst_reg;
  logic [L-1:0][1:0][4:0]        d_src_reg;
  logic [L-1:0]                  r_valid, r_has_syn, r_predict, r_srt_ok;
  op_e  [L-1:0]                  r_op;
  logic [L-1:0][11:0]            r_syn;
  pred_src_e [L-1:0]             r_src;
  logic [L-1:0][31:0]            r_value;
  logic [L-1:0][6:0]             r_rs, r_spec_tag;
  logic [L-1:0][1:0]             r_src_spec_valid;
  logic [L-1:0][1:0][6:0]        r_src_spec_tag;
  logic [L-1:0]                  v_valid, v_consumed, o_valid, o_mispec;
  vkind_e [L-1:0]                v_kind;
  logic [L-1:0][31:0]            v_spec, v_mem;
  outcome_e [L-1:0]              o_outcome;
  logic [L-1:0]                  c_valid, c_cloaked;
  op_e  [L-1:0]                  c_op;
  logic [L-1:0][31:0]            c_pc, c_addr, c_value;
  logic [L-1:0][11:0]            c_syn;
  logic [L-1:0][6:0]             c_rs;
  outcome_e [L-1:0]              c_outcome;
  logic [L-1:0]                  ev_dep_detect;
  logic [L-1:0]                  ev_new_syn, ev_merge;

  cloak_unit dut (.*);

  always #5 clk = ~clk;

  // ---------------- program ----------------
  op_e         p_op  [$];
  logic [31:0] p_pc  [$], p_addr [$], p_val [$];
  logic [4:0]  p_dst [$], p_src [$];
  logic        p_hasd[$];
  int          p_def [$];   // for stores: sequence number of the producing DEF
  kern_e       p_k   [$];
  int          p_it  [$];
  logic [31:0] mem [logic [31:0]];

  function automatic void emit(kern_e k, int it, int pos, op_e op, logic [31:0] addr,
                               logic [4:0] dst, logic [4:0] src, logic hasd, int def);
    logic [31:0] v;
    v = 32'(it * 1000 + pos + 1);
    if (op == OP_STORE) begin
      v = p_val[def];       // a store writes the value its DEF produced
      mem[addr] = v;
    end
    else if (op == OP_LOAD) v = mem.exists(addr) ? mem[addr] : 32'hDEAD_0000 + addr;
    p_op.push_back(op);  p_pc.push_back(32'h0040_0000 + 32'(pos) * 4);
    p_addr.push_back(addr);  p_val.push_back(v);
    p_dst.push_back(dst);  p_src.push_back(src);  p_hasd.push_back(hasd);
    p_def.push_back(def);  p_k.push_back(k);  p_it.push_back(it);
  endfunction

  function automatic void gen();
    for (int it = 0; it < NITER; it++) begin
      int pos, d;
      pos = 0;
      // FAR: producer at the top of the body
      d = p_op.size(); emit(K_FAR, it, pos++, OP_OTHER, 0, 5'd1, 5'd9, 1, -1);
      emit(K_FAR, it, pos++, OP_STORE, 32'h2000, 0, 5'd1, 0, d);
      // NEAR
      d = p_op.size(); emit(K_NEAR, it, pos++, OP_OTHER, 0, 5'd1, 5'd9, 1, -1);
      emit(K_NEAR, it, pos++, OP_STORE, 32'h3000 + 32'(it % 64) * 4, 0, 5'd1, 0, d);
      emit(K_NEAR, it, pos++, OP_LOAD,  32'h3000 + 32'(it % 64) * 4, 5'd2, 5'd0, 1, -1);
      emit(K_NEAR, it, pos++, OP_OTHER, 0, 5'd3, 5'd2, 1, -1);
      // ALT
      d = p_op.size(); emit(K_ALT, it, pos++, OP_OTHER, 0, 5'd1, 5'd9, 1, -1);
      if (it % 2 == 0) emit(K_ALT, it, pos++, OP_STORE, 32'h4000, 0, 5'd1, 0, d);
      else             emit(K_FILL, it, pos++, OP_OTHER, 0, 0, 5'd9, 0, -1);
      if (it % 2 == 1) emit(K_ALT, it, pos++, OP_STORE, 32'h4000, 0, 5'd1, 0, d);
      else             emit(K_FILL, it, pos++, OP_OTHER, 0, 0, 5'd9, 0, -1);
      emit(K_ALT, it, pos++, OP_LOAD, 32'h4000, 5'd4, 5'd0, 1, -1);
      // MERGE
      d = p_op.size(); emit(K_MERGE, it, pos++, OP_OTHER, 0, 5'd1, 5'd9, 1, -1);
      emit(K_MERGE, it, pos++, OP_STORE, (it % 4 == 3) ? 32'h5100 : 32'h5000, 0, 5'd1, 0, d);
      emit(K_MERGE, it, pos++, OP_LOAD, 32'h5000, 5'd5, 5'd0, 1, -1);
      d = p_op.size(); emit(K_MERGE, it, pos++, OP_OTHER, 0, 5'd1, 5'd9, 1, -1);
      if (it % 4 != 3) emit(K_MERGE, it, pos++, OP_STORE, 32'h5100, 0, 5'd1, 0, d);
      else             emit(K_FILL, it, pos++, OP_OTHER, 0, 0, 5'd9, 0, -1);
      emit(K_MERGE, it, pos++, OP_LOAD, 32'h5100, 5'd6, 5'd0, 1, -1);
      // MIS
      d = p_op.size(); emit(K_MIS, it, pos++, OP_OTHER, 0, 5'd1, 5'd9, 1, -1);
      emit(K_MIS, it, pos++, OP_STORE, (it % 3 == 2) ? 32'h6100 : 32'h6000, 0, 5'd1, 0, d);
      emit(K_MIS, it, pos++, OP_LOAD, 32'h6000, 5'd7, 5'd0, 1, -1);
      // BURST
      d = p_op.size(); emit(K_BURST, it, pos++, OP_OTHER, 0, 5'd1, 5'd9, 1, -1);
      emit(K_BURST, it, pos++, OP_STORE, 32'h7000, 0, 5'd1, 0, d);
      for (int b = 0; b < 28; b++) emit(K_BURST, it, pos++, OP_LOAD, 32'h7000, 5'd8, 5'd0, 1, -1);
      // fillers, then the FAR load
      while (pos < BODY - 1) emit(K_FILL, it, pos++, OP_OTHER, 0, 5'd9, 5'd9, 1, -1);
      emit(K_FAR, it, pos++, OP_LOAD, 32'h2000, 5'd10, 5'd0, 1, -1);
    end
  endfunction

  // ---------------- per-instruction results ----------------
  logic      q_pred [int];
  pred_src_e q_src  [int];
  logic [31:0] q_spec [int];
  logic      q_hsyn [int];
  logic [11:0] q_syn [int];
  outcome_e  q_out  [int];
  logic [31:0] def_val [int];   // DEF tag -> value its store will write

  // ---------------- statistics ----------------
  int checks = 0, failures = 0;
  int n_bypass = 0, n_sf = 0, n_shadow = 0, n_mispec = 0, n_quiet = 0, n_recover = 0;
  int n_dep4 = 0;
  int n_dep = 0, n_new = 0, n_merge = 0, n_flush = 0, n_specname = 0;
  int k_loads[K_NK], k_cov[K_NK], k_bad[K_NK];
  bit last_wrong[logic [31:0]];

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL: %s", msg);
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // in-flight decode groups: start sequence number and decode cycle
  int g_seq[$], g_cyc[$];

  initial begin
    int cyc, next, ninst, flush_done;
    int prev_seq, prev_valid;
    int ver_seq, ver_valid;   // group verified last cycle (outcome visible now)
    gen();
    ninst = p_op.size();
    for (int k = 0; k < K_NK; k++) begin k_loads[k] = 0; k_cov[k] = 0; k_bad[k] = 0; end
    d_valid = '0; v_valid = '0; c_valid = '0;
    d_op = '{default: OP_OTHER}; c_op = '{default: OP_OTHER};
    v_kind = '{default: VK_NONE}; c_outcome = '{default: OUT_NONE};
    d_pc = '0; d_rs = '0; d_src_ptag = '0; d_has_dst = '0; d_dst_reg = '0; d_src_reg = '0;
    v_spec = '0; v_mem = '0; v_consumed = '0;
    c_pc = '0; c_addr = '0; c_value = '0; c_cloaked = '0; c_syn = '0; c_rs = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    cyc = 0; next = 0; flush_done = 0; prev_valid = 0; prev_seq = 0; ver_valid = 0; ver_seq = 0;
    while ((next < ninst || g_seq.size() > 0) && cyc < 200000) begin
      int vseq, cseq;
      bit do_ver, do_com, do_flush;
      @(negedge clk);
      do_flush = (!flush_done && next > ninst / 2 && g_seq.size() >= 3);
      flush = do_flush;
      d_valid = '0; v_valid = '0; c_valid = '0;
      // commit
      do_com = g_seq.size() > 0 && g_cyc[0] + DEC2COM == cyc && !do_flush;
      cseq = do_com ? g_seq[0] : 0;
      if (do_com) begin
        for (int l = 0; l < L; l++) begin
          int s;
          s = cseq + l;
          if (s < ninst) begin
            c_valid[l]   = 1'b1;
            c_op[l]      = p_op[s];
            c_pc[l]      = p_pc[s];
            c_addr[l]    = p_addr[s];
            c_value[l]   = p_val[s];
            c_cloaked[l] = p_op[s] == OP_STORE && q_pred[s];
            c_syn[l]     = q_syn[s];
            c_rs[l]      = 7'(s);
            c_outcome[l] = p_op[s] == OP_LOAD ? q_out[s] : OUT_NONE;
          end
        end
        void'(g_seq.pop_front());
        void'(g_cyc.pop_front());
      end
      // verify
      do_ver = 0; vseq = 0;
      foreach (g_seq[i]) if (g_cyc[i] + DEC2VER == cyc && !do_flush) begin do_ver = 1; vseq = g_seq[i]; end
      if (do_ver) begin
        for (int l = 0; l < L; l++) begin
          int s;
          s = vseq + l;
          if (s < ninst && p_op[s] == OP_LOAD) begin
            v_valid[l] = 1'b1;
            v_kind[l]  = q_pred[s] ? VK_USED : (q_src[s] != SRC_NONE ? VK_SHADOW : VK_NONE);
            v_spec[l]  = q_spec[s];
            v_mem[l]   = p_val[s];
            v_consumed[l] = q_pred[s] && (s % 2 == 0);
          end
        end
      end
      // flush: squash everything in flight and restart from its oldest group
      if (do_flush) begin
        next = g_seq[0];
        g_seq.delete();
        g_cyc.delete();
        n_flush++;
        flush_done = 1;
        prev_valid = 0;
        ver_valid = 0;
      end else if (next < ninst) begin
        // decode
        for (int l = 0; l < L; l++) begin
          int s;
          s = next + l;
          if (s < ninst) begin
            d_valid[l]    = 1'b1;
            d_op[l]       = p_op[s];
            d_pc[l]       = p_pc[s];
            d_rs[l]       = 7'(s);
            d_src_ptag[l] = p_def[s] >= 0 ? 7'(p_def[s]) : 7'd0;
            d_has_dst[l]  = p_hasd[s];
            d_dst_reg[l]  = p_dst[s];
            d_src_reg[l][0] = p_src[s];
            d_src_reg[l][1] = 5'd9;
            if (p_op[s] == OP_STORE) def_val[p_def[s] % 128] = p_val[s];
          end
        end
        g_seq.push_back(next);
        g_cyc.push_back(cyc);
      end
      #1;
      // ---- response of the group decoded last cycle
      checks++;
      if (prev_valid) begin
        if (r_valid !== ((prev_seq + 4 <= ninst) ? 4'hF : 4'((1 << (ninst - prev_seq)) - 1)))
          fail($sformatf("cycle %0d: r_valid %b one cycle after decode", cyc, r_valid));
        for (int l = 0; l < L; l++) begin
          int s;
          s = prev_seq + l;
          if (s < ninst) begin
            if (r_op[l] !== p_op[s]) fail($sformatf("seq %0d: r_op", s));
            q_pred[s] = r_predict[l];
            q_src[s]  = (p_op[s] == OP_LOAD) ? r_src[l] : SRC_NONE;
            q_hsyn[s] = r_has_syn[l];
            q_syn[s]  = r_syn[l];
            q_out[s]  = OUT_NONE;
            q_spec[s] = '0;
            if (p_op[s] == OP_LOAD) begin
              if (r_src[l] == SRC_SF) q_spec[s] = r_value[l];
              if (r_src[l] == SRC_BYPASS) begin
                q_spec[s] = def_val.exists(int'(r_spec_tag[l])) ? def_val[int'(r_spec_tag[l])] : 32'hBAD0_0000;
              end
              if (r_predict[l] && r_src[l] == SRC_BYPASS) n_bypass++;
              if (r_predict[l] && r_src[l] == SRC_SF) n_sf++;
              if (r_has_syn[l] && !r_predict[l] && r_src[l] != SRC_NONE) n_shadow++;
              if (r_predict[l] && last_wrong.exists(p_pc[s]) && last_wrong[p_pc[s]]) begin
                n_recover++;
                last_wrong[p_pc[s]] = 0;
              end
              // NEAR: the bypassed load names the DEF of its own store
              if (p_k[s] == K_NEAR && r_predict[l] && r_src[l] == SRC_BYPASS) begin
                checks++;
                if (r_spec_tag[l] !== 7'(p_def[s - 1]))
                  fail($sformatf("seq %0d: bypass tag %0d, expected %0d", s, r_spec_tag[l], 7'(p_def[s - 1])));
              end
            end
            // NEAR: USE sees the speculative name of its source register
            if (p_k[s] == K_NEAR && p_op[s] == OP_OTHER && p_src[s] == 5'd2) begin
              checks++;
              if (q_pred[s - 1] && q_src[s - 1] == SRC_BYPASS) begin
                n_specname++;
                if (!(r_src_spec_valid[l][0] && r_src_spec_tag[l][0] == 7'(p_def[s - 2])))
                  fail($sformatf("seq %0d: USE spec name %0b/%0d", s, r_src_spec_valid[l][0], r_src_spec_tag[l][0]));
              end else if (r_src_spec_valid[l][0]) begin
                fail($sformatf("seq %0d: USE has a spec name without a bypassed load", s));
              end
            end
          end
        end
      end
      // ---- outcomes of the group verified last cycle
      if (ver_valid) begin
        for (int l = 0; l < L; l++) begin
          int s;
          s = ver_seq + l;
          if (s < ninst && p_op[s] == OP_LOAD) begin
            outcome_e eo;
            bit em, used;
            used = q_pred[s];
            eo = (q_pred[s] || q_src[s] != SRC_NONE) ? ((q_spec[s] == p_val[s]) ? OUT_CORRECT : OUT_WRONG) : OUT_NONE;
            em = used && (s % 2 == 0) && q_spec[s] != p_val[s];
            checks++;
            if (o_outcome[l] !== eo || o_mispec[l] !== em)
              fail($sformatf("seq %0d: outcome %0d mispec %0b, expected %0d %0b", s, o_outcome[l], o_mispec[l], eo, em));
            q_out[s] = o_outcome[l];
            if (em) n_mispec++;
            if (used && !em && eo == OUT_WRONG) n_quiet++;
            if (used && eo == OUT_WRONG) last_wrong[p_pc[s]] = 1;
            if (p_it[s] >= WARM) begin
              k_loads[p_k[s]]++;
              if (used && eo == OUT_CORRECT) k_cov[p_k[s]]++;
              if (used && eo == OUT_WRONG) k_bad[p_k[s]]++;
            end
          end
        end
      end
      // events
      n_dep   += $countones(ev_dep_detect);
      n_dep4  += int'(ev_dep_detect == '1);
      n_new   += $countones(ev_new_syn);
      n_merge += $countones(ev_merge);
      // bookkeeping for the next cycle
      ver_valid = do_ver;  ver_seq = vseq;
      if (!do_flush && next < ninst) begin
        prev_valid = 1; prev_seq = next; next += L;
      end else prev_valid = 0;
      cyc++;
    end
    @(negedge clk);
    flush = 0; d_valid = '0; v_valid = '0; c_valid = '0;
    // ---- stable kernels: no wrong used values after warm-up, good coverage
    foreach (k_loads[k]) begin
      if (k == K_NEAR || k == K_FAR || k == K_ALT || k == K_BURST) begin
        checks++;
        if (k_bad[k] != 0) fail($sformatf("kernel %0d: %0d wrong used values", k, k_bad[k]));
        checks++;
        if (k_cov[k] * 2 < k_loads[k]) fail($sformatf("kernel %0d: coverage %0d of %0d", k, k_cov[k], k_loads[k]));
      end
      $display("kernel %0d: loads %0d covered %0d wrong %0d", k, k_loads[k], k_cov[k], k_bad[k]);
    end
    $display("events: bypass=%0d sf=%0d shadow=%0d mispec=%0d quiet_wrong=%0d recover=%0d",
             n_bypass, n_sf, n_shadow, n_mispec, n_quiet, n_recover);
    $display("        dep_detect=%0d (4 in a cycle %0d) new_syn=%0d merge=%0d flush=%0d specname=%0d cycles=%0d",
             n_dep, n_dep4, n_new, n_merge, n_flush, n_specname, cyc);
    checks++; if (n_bypass   == 0) fail("no bypassed load");
    checks++; if (n_sf       == 0) fail("no load served from the synonym file");
    checks++; if (n_shadow   == 0) fail("no shadow check");
    checks++; if (n_mispec   == 0) fail("no signalled mispeculation");
    checks++; if (n_quiet    == 0) fail("no unsignalled wrong value");
    checks++; if (n_recover  == 0) fail("no predictor recovery");
    checks++; if (n_dep      == 0) fail("no detected dependence");
    checks++; if (n_dep4     == 0) fail("no cycle with four DPNT updates from detections");
    checks++; if (n_new      == 0) fail("no new synonym");
    checks++; if (n_merge    == 0) fail("no synonym merge");
    checks++; if (n_flush    == 0) fail("no flush");
    checks++; if (n_specname == 0) fail("no speculative register name");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
