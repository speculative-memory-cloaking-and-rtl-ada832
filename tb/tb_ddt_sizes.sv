// tb_ddt_sizes: dependence detection as a function of DDT size.
//
// The detection table decides which dependences the predictor can ever learn:
// a load only finds its producing store while that store's word is still
// recorded. This bench runs one stimulus through four tables of 32, 128, 512
// and 2048 words, the sizes over which the method's accuracy was measured
// (128 is the size of the full unit).
//
// Every cycle three lanes commit stores to fresh word addresses and the
// youngest lane commits a load that reads the word written d stores earlier
// (d = 1 is the store just before it, possibly in the same cycle). Since every
// store writes a new word, a table of N words still holds that word exactly
// when d <= N, and must then report that store's PC. Distances are drawn
// across 1..2600 with extra weight around each table size, so both sides of
// every boundary are hit. The bench checks each load on each table, then
// prints the fraction detected per size and checks that it never decreases
// as the table grows. Timing: load results are combinational in the commit
// cycle; stores take effect at the clock edge.
module tb_ddt_sizes;
  localparam int unsigned LANES  = 4;
  localparam int unsigned NSIZE  = 4;
  localparam int unsigned SIZES [NSIZE] = '{32, 128, 512, 2048};
  localparam int          NCYC   = 3000;
  localparam int          MAXD   = 2600;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [LANES-1:0]       c_valid, c_is_store;
  logic [LANES-1:0][31:0] c_addr, c_pc;
  logic [LANES-1:0]       dep_found [NSIZE];
  logic [LANES-1:0][31:0] dep_stpc  [NSIZE];

  for (genvar g = 0; g < NSIZE; g++) begin : g_ddt
    ddt #(.ENTRIES(SIZES[g]), .LANES(LANES)) dut (
      .clk, .rst_n, .c_valid, .c_is_store, .c_addr, .c_pc,
      .dep_found(dep_found[g]), .dep_stpc(dep_stpc[g])
    );
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] st_addr(int s);
    return 32'h0100_0000 + 32'(s) * 4;
  endfunction
  function automatic logic [31:0] st_pc(int s);
    return 32'h0040_0000 + 32'(s % 4093) * 4;
  endfunction

  int nstores = 0;
  int nloads  = 0;
  int found   [NSIZE];
  int d;

  initial begin
    foreach (found[i]) found[i] = 0;
    c_valid = '0; c_is_store = '0; c_addr = '0; c_pc = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < NCYC; cyc++) begin
      @(negedge clk);
      for (int l = 0; l < LANES - 1; l++) begin
        c_valid[l]    = 1'b1;
        c_is_store[l] = 1'b1;
        c_addr[l]     = st_addr(nstores + l);
        c_pc[l]       = st_pc(nstores + l);
      end
      // the load, with its distance counted over all stores so far
      case ($urandom_range(0, 4))
        0: d = $urandom_range(1, MAXD);
        default: d = int'(SIZES[$urandom_range(0, NSIZE - 1)]) + $urandom_range(0, 6) - 3;
      endcase
      if (d < 1) d = 1;
      c_valid[LANES-1]    = nstores + LANES - 1 >= d;
      c_is_store[LANES-1] = 1'b0;
      c_addr[LANES-1]     = st_addr(nstores + LANES - 1 - d) + 32'($urandom_range(0, 3));
      c_pc[LANES-1]       = 32'h0080_0000;
      #1;
      if (c_valid[LANES-1] && nstores + LANES - 1 >= MAXD) begin
        nloads++;
        for (int i = 0; i < NSIZE; i++) begin
          checks++;
          if (dep_found[i][LANES-1] != (d <= int'(SIZES[i]))) begin
            failures++;
            if (failures < 10)
              $display("FAIL size %0d distance %0d: found=%0b", SIZES[i], d, dep_found[i][LANES-1]);
          end else if (dep_found[i][LANES-1]) begin
            found[i]++;
            checks++;
            if (dep_stpc[i][LANES-1] != st_pc(nstores + LANES - 1 - d)) begin
              failures++;
              if (failures < 10)
                $display("FAIL size %0d distance %0d: stpc=%h", SIZES[i], d, dep_stpc[i][LANES-1]);
            end
          end
        end
      end
      nstores += LANES - 1;
    end
    @(negedge clk);
    c_valid = '0;
    for (int i = 0; i < NSIZE; i++)
      $display("DDT %4d words: %0d of %0d loads detected (%0d%%)", SIZES[i], found[i], nloads,
               found[i] * 100 / nloads);
    for (int i = 1; i < NSIZE; i++) begin
      checks++;
      if (found[i] < found[i-1]) begin
        failures++;
        $display("FAIL detection fell from %0d to %0d words", SIZES[i-1], SIZES[i]);
      end
    end
    checks++;
    if (nloads < 1000) begin
      failures++;
      $display("FAIL only %0d loads measured", nloads);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
