// tb_verify_unit: self-checking test of load value verification.
//
// Random lanes with every combination of speculation kind (none, shadow,
// used), consumed flag and equal or different values (values drawn from a
// small set so that equality is frequent). The outcome and the mispeculation
// strobe are checked one cycle later against the rule: compare whenever a
// value existed; notify consumers only when the value was used, consumed and
// wrong.
module tb_verify_unit;
  import cloak_pkg::*;
  localparam int unsigned LANES  = 4;
  localparam int unsigned DATA_W = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [LANES-1:0]             v_valid, v_consumed, o_valid, o_mispec;
  vkind_e [LANES-1:0]           v_kind;
  logic [LANES-1:0][DATA_W-1:0] v_spec, v_mem;
  outcome_e [LANES-1:0]         o_outcome;
  int checks = 0, failures = 0;

  verify_unit #(.LANES(LANES), .DATA_W(DATA_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_mis = 0, n_ok = 0, n_wrong_quiet = 0;

  initial begin
    outcome_e exp_o[LANES];
    bit       exp_m[LANES];
    bit       exp_v[LANES];
    v_valid = '0; v_consumed = '0; v_spec = '0; v_mem = '0;
    for (int l = 0; l < LANES; l++) v_kind[l] = VK_NONE;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      for (int l = 0; l < LANES; l++) begin
        v_valid[l] = $urandom_range(0, 3) != 0;
        v_kind[l]  = vkind_e'($urandom_range(0, 2));
        v_consumed[l] = (v_kind[l] == VK_USED) && $urandom_range(0, 1) == 1;
        v_spec[l]  = 32'($urandom_range(0, 2));
        v_mem[l]   = 32'($urandom_range(0, 2));
        exp_v[l]   = v_valid[l];
        exp_o[l]   = OUT_NONE;
        exp_m[l]   = 1'b0;
        if (v_valid[l] && v_kind[l] != VK_NONE) begin
          exp_o[l] = (v_spec[l] == v_mem[l]) ? OUT_CORRECT : OUT_WRONG;
          exp_m[l] = v_kind[l] == VK_USED && v_consumed[l] && v_spec[l] != v_mem[l];
        end
      end
      @(posedge clk);
      #1;
      for (int l = 0; l < LANES; l++) begin
        checks++;
        if (o_valid[l] !== exp_v[l] || o_outcome[l] !== exp_o[l] || o_mispec[l] !== exp_m[l]) begin
          failures++;
          if (failures < 10) $display("cyc %0d lane %0d: v=%0b o=%0d m=%0b, expected %0b %0d %0b",
                                      cyc, l, o_valid[l], o_outcome[l], o_mispec[l], exp_v[l], exp_o[l], exp_m[l]);
        end
        if (exp_m[l]) n_mis++;
        if (exp_o[l] == OUT_CORRECT) n_ok++;
        if (exp_o[l] == OUT_WRONG && !exp_m[l]) n_wrong_quiet++;
      end
    end
    checks++;
    if (n_mis < 50 || n_ok < 50 || n_wrong_quiet < 50) begin
      failures++;
      $display("coverage: mis=%0d ok=%0d quiet=%0d", n_mis, n_ok, n_wrong_quiet);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
