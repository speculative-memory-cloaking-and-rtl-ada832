// tb_sf: self-checking test of the synonym file.
//
// Random cycles of 4 commit writes, 4 decode allocations and 4 reads over a
// pool of 16 synonyms (two per set of an 8-set, 2-way file, so no set
// overflows) are compared with a reference holding one (present, full, value)
// record per synonym and applying, for each read, all writes of the cycle and
// then the allocations of older lanes. A final directed part puts a third
// synonym into a full set and checks that it is present and exactly one of
// the older two was replaced.
module tb_sf;
  localparam int unsigned ENTRIES = 16;
  localparam int unsigned WAYS    = 2;
  localparam int unsigned LANES   = 4;
  localparam int unsigned SYN_W   = 6;
  localparam int unsigned DATA_W  = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [LANES-1:0]             al_valid, wr_valid, rd_valid, rd_hit, rd_full;
  logic [LANES-1:0][SYN_W-1:0]  al_syn, wr_syn, rd_syn;
  logic [LANES-1:0][DATA_W-1:0] wr_data, rd_data;
  int checks = 0, failures = 0;

  sf #(.ENTRIES(ENTRIES), .WAYS(WAYS), .LANES(LANES), .SYN_W(SYN_W), .DATA_W(DATA_W)) dut (.*);

  always #5 clk = ~clk;

  bit          m_v   [16];
  bit          m_f   [16];
  logic [31:0] m_d   [16];

  // pool index -> synonym: set = i % 8, name = i / 8 (names 0 and 5)
  function automatic logic [SYN_W-1:0] syn_of(int i);
    return SYN_W'((i / 8) * 5 * 8 + (i % 8));
  endfunction

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_full = 0, n_empty = 0;

  initial begin
    int wi[LANES], ai[LANES], ri[LANES];
    al_valid = '0; wr_valid = '0; rd_valid = '0; al_syn = '0; wr_syn = '0; rd_syn = '0; wr_data = '0;
    foreach (m_v[i]) begin m_v[i] = 0; m_f[i] = 0; m_d[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      for (int l = 0; l < LANES; l++) begin
        wi[l] = $urandom_range(0, 15);  ai[l] = $urandom_range(0, 15);  ri[l] = $urandom_range(0, 15);
        wr_valid[l] = ($urandom_range(0, 2) == 0);  wr_syn[l] = syn_of(wi[l]);  wr_data[l] = $urandom;
        al_valid[l] = ($urandom_range(0, 3) == 0);  al_syn[l] = syn_of(ai[l]);
        rd_valid[l] = ($urandom_range(0, 3) != 0);  rd_syn[l] = syn_of(ri[l]);
      end
      #1;
      for (int l = 0; l < LANES; l++) begin
        bit v, f;
        logic [31:0] d;
        v = m_v[ri[l]];  f = m_f[ri[l]];  d = m_d[ri[l]];
        for (int k = 0; k < LANES; k++)
          if (wr_valid[k] && wi[k] == ri[l]) begin v = 1; f = 1; d = wr_data[k]; end
        for (int k = 0; k < l; k++)
          if (al_valid[k] && ai[k] == ri[l]) begin v = 1; f = 0; end
        if (rd_valid[l]) begin
          checks++;
          if (rd_hit[l] !== v || rd_full[l] !== (v && f) || (v && f && rd_data[l] !== d)) begin
            failures++;
            if (failures < 10)
              $display("cyc %0d lane %0d: hit=%0b full=%0b data=%h, expected %0b %0b %h",
                       cyc, l, rd_hit[l], rd_full[l], rd_data[l], v, v && f, d);
          end
          if (v && f) n_full++;
          if (v && !f) n_empty++;
        end
      end
      for (int k = 0; k < LANES; k++)
        if (wr_valid[k]) begin m_v[wi[k]] = 1; m_f[wi[k]] = 1; m_d[wi[k]] = wr_data[k]; end
      for (int k = 0; k < LANES; k++)
        if (al_valid[k]) begin m_v[ai[k]] = 1; m_f[ai[k]] = 0; end
    end
    // directed: a third synonym in set 3 (names 0, 5 present; now name 2)
    @(negedge clk);
    wr_valid = '0; al_valid = '0; rd_valid = '0;
    wr_valid[0] = 1'b1; wr_syn[0] = SYN_W'(2 * 8 + 3); wr_data[0] = 32'hCAFE_0003;
    @(negedge clk);
    wr_valid = '0;
    rd_valid = '1;
    rd_syn[0] = SYN_W'(2 * 8 + 3);  rd_syn[1] = syn_of(3);  rd_syn[2] = syn_of(11);  rd_syn[3] = syn_of(4);
    #1;
    checks++;
    if (!(rd_hit[0] && rd_full[0] && rd_data[0] == 32'hCAFE_0003 && (rd_hit[1] ^ rd_hit[2]) && rd_hit[3] == m_v[4])) begin
      failures++;
      $display("replacement: hit %b full %b data %h", rd_hit, rd_full, rd_data[0]);
    end
    checks++;
    if (n_full < 100 || n_empty < 100) begin
      failures++;
      $display("coverage: full=%0d empty=%0d", n_full, n_empty);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
