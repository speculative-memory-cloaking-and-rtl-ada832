// spec_name_map: speculative register names for memory bypassing.
//
// Bypassing turns a DEF-store-load-USE chain into DEF-USE. When a load is
// predicted to read the value of an in-flight store, the load learns (through
// the synonym rename table) the name TAG1 of the store's source register, the
// place where DEF puts its result. That name is attached to the load's
// destination register as a second, speculative name next to its actual one.
// A later instruction USE reading that register sees both names and can link
// to DEF directly. This module keeps the speculative half of the register map;
// the actual renaming belongs to the host core.
//
// Interface: LANES rename lanes per cycle, lane 0 oldest. Each lane may write a
// destination register (has_dst, dst_reg); a bypassed load also sets set_spec
// with spec_tag, any other write removes the register's speculative name. Each
// lane reads two source registers; a read sees writes of older lanes in the
// same cycle, not of its own lane. Reads are combinational, writes take effect
// at the clock edge. Register 0 is never given a name. flush clears all names.
// The register count (32) follows the MIPS-like instruction set; the rest of
// the policy is this design's.
module spec_name_map #(
  parameter int unsigned NREG   = 32,
  parameter int unsigned LANES  = 4,
  parameter int unsigned PTAG_W = 7,
  localparam int unsigned REG_W = $clog2(NREG)
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              flush,
  input  logic [LANES-1:0]                  valid,
  input  logic [LANES-1:0]                  has_dst,
  input  logic [LANES-1:0][REG_W-1:0]       dst_reg,
  input  logic [LANES-1:0]                  set_spec,
  input  logic [LANES-1:0][PTAG_W-1:0]      spec_tag,
  input  logic [LANES-1:0][1:0][REG_W-1:0]  src_reg,
  output logic [LANES-1:0][1:0]             src_spec_valid,
  output logic [LANES-1:0][1:0][PTAG_W-1:0] src_spec_tag
);
  logic [NREG-1:0]   sv_q;
  logic [PTAG_W-1:0] tag_q [NREG];

  logic [LANES-1:0] wr;
  always_comb begin
    for (int l = 0; l < LANES; l++) wr[l] = valid[l] && has_dst[l] && dst_reg[l] != '0;
  end

  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      for (int s = 0; s < 2; s++) begin
        src_spec_valid[l][s] = sv_q[src_reg[l][s]];
        src_spec_tag[l][s]   = tag_q[src_reg[l][s]];
        for (int j = 0; j < l; j++) begin
          if (wr[j] && dst_reg[j] == src_reg[l][s]) begin
            src_spec_valid[l][s] = set_spec[j];
            src_spec_tag[l][s]   = spec_tag[j];
          end
        end
        if (!src_spec_valid[l][s]) src_spec_tag[l][s] = '0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || flush) begin
      sv_q <= '0;
    end else begin
      for (int l = 0; l < LANES; l++) begin
        if (wr[l]) begin
          sv_q[dst_reg[l]]  <= set_spec[l];
          tag_q[dst_reg[l]] <= spec_tag[l];
        end
      end
    end
  end

endmodule
