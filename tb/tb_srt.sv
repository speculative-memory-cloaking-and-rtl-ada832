// tb_srt: self-checking test of the synonym rename table.
//
// Random cycles of 4 releases (committing stores, usually naming a live
// mapping, sometimes a stale one), 4 allocations (predicted stores) and 4
// lookups (predicted loads) over 24 synonyms into an 8-entry table, with an
// occasional flush. The reference keeps a synonym -> (station, name) map of
// at most 8 mappings and applies releases, then allocations lane by lane;
// a lookup sees the allocations of older lanes. al_ok, lk_hit, lk_rs and
// lk_ptag are all compared; the table must also run full.
module tb_srt;
  localparam int unsigned ENTRIES = 8;
  localparam int unsigned LANES   = 4;
  localparam int unsigned SYN_W   = 12;
  localparam int unsigned RS_W    = 7;
  localparam int unsigned PTAG_W  = 7;

  logic clk = 1'b0, rst_n = 1'b0, flush = 1'b0;
  logic [LANES-1:0]             al_valid, al_ok, lk_valid, lk_hit, rl_valid;
  logic [LANES-1:0][SYN_W-1:0]  al_syn, lk_syn, rl_syn;
  logic [LANES-1:0][RS_W-1:0]   al_rs, lk_rs, rl_rs;
  logic [LANES-1:0][PTAG_W-1:0] al_ptag, lk_ptag;
  int checks = 0, failures = 0;

  srt #(.ENTRIES(ENTRIES), .LANES(LANES), .SYN_W(SYN_W), .RS_W(RS_W), .PTAG_W(PTAG_W)) dut (.*);

  always #5 clk = ~clk;

  logic [RS_W-1:0]   m_rs  [int];
  logic [PTAG_W-1:0] m_tag [int];

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_full = 0, n_hit = 0, n_rel = 0;

  initial begin
    al_valid = '0; lk_valid = '0; rl_valid = '0; al_syn = '0; lk_syn = '0; rl_syn = '0;
    al_rs = '0; rl_rs = '0; al_ptag = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      flush = ($urandom_range(0, 199) == 0);
      for (int l = 0; l < LANES; l++) begin
        al_valid[l] = ($urandom_range(0, 2) == 0);
        al_syn[l]   = SYN_W'($urandom_range(100, 123));
        al_rs[l]    = RS_W'($urandom);
        al_ptag[l]  = PTAG_W'($urandom);
        lk_valid[l] = ($urandom_range(0, 1) == 0);
        lk_syn[l]   = SYN_W'($urandom_range(100, 123));
        rl_valid[l] = ($urandom_range(0, 2) == 0);
        rl_syn[l]   = SYN_W'($urandom_range(100, 123));
        rl_rs[l]    = RS_W'($urandom);
        if (m_rs.exists(int'(rl_syn[l])) && $urandom_range(0, 3) != 0) rl_rs[l] = m_rs[int'(rl_syn[l])];
      end
      #1;
      // releases
      for (int l = 0; l < LANES; l++) begin
        if (rl_valid[l] && m_rs.exists(int'(rl_syn[l])) && m_rs[int'(rl_syn[l])] == rl_rs[l]) begin
          m_rs.delete(int'(rl_syn[l]));
          m_tag.delete(int'(rl_syn[l]));
          n_rel++;
        end
      end
      // lookups and allocations in lane order
      for (int l = 0; l < LANES; l++) begin
        bit ok;
        if (lk_valid[l]) begin
          bit h;
          h = m_rs.exists(int'(lk_syn[l]));
          checks++;
          if (lk_hit[l] !== h || (h && (lk_rs[l] !== m_rs[int'(lk_syn[l])] || lk_ptag[l] !== m_tag[int'(lk_syn[l])]))) begin
            failures++;
            if (failures < 10) $display("cyc %0d lane %0d lookup %0d: hit=%0b rs=%0d, expected %0b", cyc, l, lk_syn[l], lk_hit[l], lk_rs[l], h);
          end
          if (h) n_hit++;
        end
        ok = al_valid[l] && (m_rs.exists(int'(al_syn[l])) || m_rs.num() < ENTRIES);
        checks++;
        if (al_ok[l] !== ok) begin
          failures++;
          if (failures < 10) $display("cyc %0d lane %0d alloc: ok=%0b expected %0b", cyc, l, al_ok[l], ok);
        end
        if (al_valid[l] && !ok) n_full++;
        if (ok) begin  // a flush clears it at the clock edge, after younger lanes saw it
          m_rs[int'(al_syn[l])]  = al_rs[l];
          m_tag[int'(al_syn[l])] = al_ptag[l];
        end
      end
      if (flush) begin
        m_rs.delete();
        m_tag.delete();
      end
    end
    checks++;
    if (n_full < 50 || n_hit < 200 || n_rel < 200) begin
      failures++;
      $display("coverage: full=%0d hit=%0d rel=%0d", n_full, n_hit, n_rel);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
