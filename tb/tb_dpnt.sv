// tb_dpnt: self-checking test of the dependence prediction and naming table.
//
// Part 1 applies 1500 cycles of up to 4 random commit-time updates (detected dependence or not,
// verification outcome none/correct/wrong) for 6 load and 6 store PCs placed
// so that no set overflows, and after every update compares the lookup of
// every PC (hit, predict, synonym) and the new-synonym / merge strobes with a
// reference that applies the lanes in order and keeps one record per PC: synonyms assigned incrementally,
// merged to the smaller, predictor states 0..3 with use at 2 and 3.
// Part 2 fills one set with three loads and checks that the newest is present
// and exactly one of the older two was replaced.
module tb_dpnt;
  import cloak_pkg::*;
  localparam int unsigned ENTRIES = 16;
  localparam int unsigned WAYS    = 2;
  localparam int unsigned LANES   = 4;
  localparam int unsigned SYN_W   = 12;
  localparam int unsigned NPC     = 12;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [LANES-1:0][31:0]      lk_pc;
  logic [LANES-1:0]            lk_hit, lk_predict;
  logic [LANES-1:0][SYN_W-1:0] lk_syn;
  logic [LANES-1:0]            up_valid, up_dep;
  logic [LANES-1:0][31:0]      up_ld_pc, up_st_pc;
  outcome_e [LANES-1:0]        up_outcome;
  logic [LANES-1:0]            ev_new_syn, ev_merge;
  int checks = 0, failures = 0;

  dpnt #(.ENTRIES(ENTRIES), .WAYS(WAYS), .LANES(LANES), .SYN_W(SYN_W)) dut (.*);

  always #5 clk = ~clk;

  // reference
  bit          m_v   [NPC];
  int unsigned m_pred[NPC];
  int unsigned m_syn [NPC];
  int unsigned m_next;
  int n_new = 0, n_merge = 0, n_recover = 0;

  function automatic logic [31:0] pc_of(int i);
    return (i < 8) ? 32'h0040_0000 + 32'(i) * 4 : 32'h0040_0100 + 32'(i - 8) * 4;
  endfunction

  task automatic check_all();
    for (int base = 0; base < NPC; base += LANES) begin
      for (int l = 0; l < LANES; l++) lk_pc[l] = pc_of(base + l);
      #1;
      for (int l = 0; l < LANES; l++) begin
        int i;
        i = base + l;
        checks++;
        if (lk_hit[l] !== m_v[i] ||
            (m_v[i] && (lk_predict[l] !== (m_pred[i] >= 2) || lk_syn[l] !== SYN_W'(m_syn[i])))) begin
          failures++;
          if (failures < 10)
            $display("pc %0d: hit=%0b pred=%0b syn=%0d, expected %0b %0b %0d",
                     i, lk_hit[l], lk_predict[l], lk_syn[l], m_v[i], m_pred[i] >= 2, m_syn[i]);
        end
      end
    end
  endtask

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    up_valid = '0; up_dep = '0; up_ld_pc = '0; up_st_pc = '0; up_outcome = '{default: OUT_NONE}; lk_pc = '0;
    m_next = 0;
    foreach (m_v[i]) begin m_v[i] = 0; m_pred[i] = 0; m_syn[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 1500; it++) begin
      int li[LANES], si[LANES];
      bit exp_new[LANES], exp_merge[LANES];
      @(negedge clk);
      for (int k = 0; k < LANES; k++) begin
        li[k] = $urandom_range(0, 5);         // loads: PCs 0..5
        si[k] = $urandom_range(6, 11);        // stores: PCs 6..11
        up_valid[k]   = $urandom_range(0, 3) != 0;
        up_dep[k]     = ($urandom_range(0, 3) == 0);
        up_ld_pc[k]   = pc_of(li[k]);
        up_st_pc[k]   = pc_of(si[k]);
        up_outcome[k] = outcome_e'($urandom_range(0, 2));
      end
      #1;
      // reference: the lanes one after another
      for (int k = 0; k < LANES; k++) begin
        bit lh;
        int unsigned syn;
        exp_new[k] = 0; exp_merge[k] = 0;
        if (up_valid[k]) begin
          lh = m_v[li[k]];
          if (up_dep[k]) begin
            if (m_v[li[k]] && m_v[si[k]]) begin
              syn = (m_syn[li[k]] < m_syn[si[k]]) ? m_syn[li[k]] : m_syn[si[k]];
              exp_merge[k] = (m_syn[li[k]] != m_syn[si[k]]);
            end else if (m_v[li[k]]) syn = m_syn[li[k]];
            else if (m_v[si[k]]) syn = m_syn[si[k]];
            else begin
              syn = m_next;
              m_next = (m_next + 1) % (1 << SYN_W);
              exp_new[k] = 1;
            end
            if (!m_v[li[k]]) begin m_v[li[k]] = 1; m_pred[li[k]] = 2; end
            if (!m_v[si[k]]) begin m_v[si[k]] = 1; m_pred[si[k]] = 3; end
            m_syn[li[k]] = syn;
            m_syn[si[k]] = syn;
          end
          if (lh) begin
            if (up_outcome[k] == OUT_CORRECT) begin
              if (m_pred[li[k]] == 1) n_recover++;
              if (m_pred[li[k]] < 3) m_pred[li[k]]++;
            end else if (up_outcome[k] == OUT_WRONG) m_pred[li[k]] = 0;
          end
        end
        checks++;
        if (ev_new_syn[k] !== exp_new[k] || ev_merge[k] !== exp_merge[k]) begin
          failures++;
          $display("it %0d lane %0d: new=%0b merge=%0b expected %0b %0b", it, k, ev_new_syn[k], ev_merge[k], exp_new[k], exp_merge[k]);
        end
        n_new += int'(exp_new[k]);
        n_merge += int'(exp_merge[k]);
      end
      @(negedge clk);
      up_valid = '0;
      check_all();
    end
    // Part 2: replacement in one set (set 7 of 8): two loads, then a third
    @(negedge clk);
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 3; k++) begin
      @(negedge clk);
      up_valid = '0;  up_valid[0] = 1'b1;  up_dep[0] = 1'b1;  up_outcome[0] = OUT_NONE;
      up_ld_pc[0] = 32'h0050_001c + 32'(k) * 32'h1000;   // same set, different tags
      up_st_pc[0] = 32'h0060_0000 + 32'(k) * 4;          // stores in sets 0..2
    end
    @(negedge clk);
    up_valid = '0;
    for (int k = 0; k < 3; k++) lk_pc[k] = 32'h0050_001c + 32'(k) * 32'h1000;
    lk_pc[3] = 32'h0060_0000;
    #1;
    checks++;
    if (!(lk_hit[2] && (lk_hit[0] ^ lk_hit[1]) && lk_hit[3])) begin
      failures++;
      $display("replacement: hits %b", lk_hit);
    end
    checks++;
    if (n_new < 3 || n_merge < 3 || n_recover < 3) begin
      failures++;
      $display("coverage: new=%0d merge=%0d recover=%0d", n_new, n_merge, n_recover);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
