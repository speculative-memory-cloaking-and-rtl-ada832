// verify_unit: verification of speculatively communicated load values.
//
// A value obtained through cloaking or bypassing is only a prediction: when
// the load finally reads memory, the memory value is compared with the value
// the load obtained early. Equal values mean the speculation was correct and
// nothing else happens. A different value is a mispeculation; it is signalled
// to the load's consumers (so they re-execute) only if a consumer actually
// used the speculative value. A load that had a synonym but was told by the
// predictor not to use it (a "shadow" load) is still compared, so that the
// predictor can learn when cloaking becomes worthwhile again.
//
// Interface: LANES independent lanes. Inputs in cycle t (v_valid, v_kind,
// v_spec, v_mem, v_consumed); results registered, valid in cycle t+1:
// o_outcome (none / correct / wrong, carried by the core to commit where it
// updates the predictor) and o_mispec (re-execute the load's consumers).
// The comparison is the scheme's; the one-cycle latency is this design's.
module verify_unit
  import cloak_pkg::*;
#(
  parameter int unsigned LANES  = 4,
  parameter int unsigned DATA_W = 32
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [LANES-1:0]             v_valid,
  input  vkind_e [LANES-1:0]           v_kind,
  input  logic [LANES-1:0][DATA_W-1:0] v_spec,
  input  logic [LANES-1:0][DATA_W-1:0] v_mem,
  input  logic [LANES-1:0]             v_consumed,
  output logic [LANES-1:0]             o_valid,
  output outcome_e [LANES-1:0]         o_outcome,
  output logic [LANES-1:0]             o_mispec
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      o_valid   <= '0;
      o_mispec  <= '0;
      for (int l = 0; l < LANES; l++) o_outcome[l] <= OUT_NONE;
    end else begin
      for (int l = 0; l < LANES; l++) begin
        o_valid[l]   <= v_valid[l];
        o_outcome[l] <= OUT_NONE;
        o_mispec[l]  <= 1'b0;
        if (v_valid[l] && v_kind[l] != VK_NONE) begin
          o_outcome[l] <= (v_spec[l] == v_mem[l]) ? OUT_CORRECT : OUT_WRONG;
          o_mispec[l]  <= (v_kind[l] == VK_USED) && v_consumed[l] && (v_spec[l] != v_mem[l]);
        end
      end
    end
  end

  // A consumer can only have used a value that was handed out.
  always @(posedge clk) begin
    for (int l = 0; l < LANES; l++) begin
      if (rst_n && v_valid[l] && v_consumed[l])
        assert (v_kind[l] == VK_USED) else $error("lane %0d: consumed value that was not used", l);
    end
  end

endmodule
