// tb_ddt: self-checking test of the dependence detection table.
//
// Drives random groups of committing loads and stores (4 lanes, a pool of 16
// word addresses, some sharing a word at different byte offsets) into an
// 8-entry table and compares every load's reported producer with a reference
// that applies the lanes one at a time to an ordered list of recorded words,
// dropping the oldest-recorded word when the list overflows.
module tb_ddt;
  localparam int unsigned ENTRIES = 8;
  localparam int unsigned LANES   = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [LANES-1:0]        c_valid, c_is_store, dep_found;
  logic [LANES-1:0][31:0]  c_addr, c_pc, dep_stpc;
  int checks = 0, failures = 0;

  ddt #(.ENTRIES(ENTRIES), .LANES(LANES)) dut (.*);

  always #5 clk = ~clk;

  // reference: ordered list of (word, pc)
  logic [29:0] m_addr[$];
  logic [31:0] m_pc[$];

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int hits = 0, evictions = 0;

  initial begin
    c_valid = '0; c_is_store = '0; c_addr = '0; c_pc = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      for (int l = 0; l < LANES; l++) begin
        c_valid[l]    = ($urandom_range(0, 3) != 0);
        c_is_store[l] = 1'($urandom_range(0, 1));
        c_addr[l]     = 32'h1000 + 32'($urandom_range(0, 15)) * 4 + 32'($urandom_range(0, 3));
        c_pc[l]       = 32'h400000 + 32'($urandom_range(0, 255)) * 4;
      end
      #1;
      for (int l = 0; l < LANES; l++) begin
        int idx;
        idx = -1;
        foreach (m_addr[i]) if (m_addr[i] == c_addr[l][31:2]) idx = i;
        if (c_valid[l] && !c_is_store[l]) begin
          checks++;
          if (dep_found[l] !== (idx >= 0) || (idx >= 0 && dep_stpc[l] !== m_pc[idx])) begin
            failures++;
            if (failures < 10)
              for (int q = 0; q < LANES; q++) $display("  lane %0d v=%0b st=%0b a=%h pc=%h", q, c_valid[q], c_is_store[q], c_addr[q], c_pc[q]);
              $display("cyc %0d lane %0d: found=%0b pc=%h, expected found=%0b pc=%h",
                       cyc, l, dep_found[l], dep_stpc[l], idx >= 0, idx >= 0 ? m_pc[idx] : 0);
          end
          if (idx >= 0) hits++;
        end else if (c_valid[l] && c_is_store[l]) begin
          if (idx >= 0) m_pc[idx] = c_pc[l];
          else begin
            m_addr.push_back(c_addr[l][31:2]);
            m_pc.push_back(c_pc[l]);
            if (m_addr.size() > ENTRIES) begin
              void'(m_addr.pop_front());
              void'(m_pc.pop_front());
              evictions++;
            end
          end
        end
      end
    end
    checks++;
    if (hits < 100 || evictions < 100) begin
      failures++;
      $display("coverage too low: hits=%0d evictions=%0d", hits, evictions);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
