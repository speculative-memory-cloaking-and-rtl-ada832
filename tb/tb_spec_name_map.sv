// tb_spec_name_map: self-checking test of the speculative register names.
//
// Random rename groups of 4 instructions write destination registers (some
// as bypassed loads carrying a speculative name, including writes to register
// 0) and read two sources each; an occasional flush clears everything. The
// reference keeps a name per register and applies the lanes in order: a read
// sees older lanes of the group, not its own.
module tb_spec_name_map;
  localparam int unsigned NREG   = 32;
  localparam int unsigned LANES  = 4;
  localparam int unsigned PTAG_W = 7;

  logic clk = 1'b0, rst_n = 1'b0, flush = 1'b0;
  logic [LANES-1:0]                  valid, has_dst, set_spec;
  logic [LANES-1:0][4:0]             dst_reg;
  logic [LANES-1:0][PTAG_W-1:0]      spec_tag;
  logic [LANES-1:0][1:0][4:0]        src_reg;
  logic [LANES-1:0][1:0]             src_spec_valid;
  logic [LANES-1:0][1:0][PTAG_W-1:0] src_spec_tag;
  int checks = 0, failures = 0;

  spec_name_map #(.NREG(NREG), .LANES(LANES), .PTAG_W(PTAG_W)) dut (.*);

  always #5 clk = ~clk;

  bit          m_v [NREG];
  logic [6:0]  m_t [NREG];

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_spec = 0;

  initial begin
    valid = '0; has_dst = '0; set_spec = '0; dst_reg = '0; spec_tag = '0; src_reg = '0;
    foreach (m_v[i]) begin m_v[i] = 0; m_t[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      flush = $urandom_range(0, 99) == 0;
      for (int l = 0; l < LANES; l++) begin
        valid[l]    = $urandom_range(0, 3) != 0;
        has_dst[l]  = $urandom_range(0, 3) != 0;
        dst_reg[l]  = 5'($urandom_range(0, 7));
        set_spec[l] = $urandom_range(0, 1) == 1;
        spec_tag[l] = PTAG_W'($urandom);
        src_reg[l][0] = 5'($urandom_range(0, 7));
        src_reg[l][1] = 5'($urandom_range(0, 7));
      end
      #1;
      for (int l = 0; l < LANES; l++) begin
        for (int s = 0; s < 2; s++) begin
          int r;
          r = int'(src_reg[l][s]);
          checks++;
          if (src_spec_valid[l][s] !== m_v[r] || (m_v[r] && src_spec_tag[l][s] !== m_t[r])) begin
            failures++;
            if (failures < 10) $display("cyc %0d lane %0d src %0d (r%0d): %0b %0d, expected %0b %0d",
                                        cyc, l, s, r, src_spec_valid[l][s], src_spec_tag[l][s], m_v[r], m_t[r]);
          end
          if (m_v[r]) n_spec++;
        end
        if (valid[l] && has_dst[l] && dst_reg[l] != 0) begin
          m_v[dst_reg[l]] = set_spec[l];
          m_t[dst_reg[l]] = spec_tag[l];
        end
      end
      if (flush) foreach (m_v[i]) m_v[i] = 0;
    end
    checks++;
    if (n_spec < 500) begin
      failures++;
      $display("coverage: spec=%0d", n_spec);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
