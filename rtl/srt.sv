// srt: Synonym Rename Table.
//
// While the store that produces a synonym's value is still in flight, loads
// must find the value at that store rather than in the synonym file. The SRT
// maps a synonym to the reservation station holding the producing store and,
// for memory bypassing, to the name (TAG1) of that store's source register,
// i.e. where the store's value producer (DEF) puts its result.
//
// Ports (LANES each, lane 0 oldest):
//   al_*  a predicted store at decode creates or overwrites the mapping of its
//         synonym (a newer store instance is a new version); al_ok=0 when no
//         entry is free, and the store then goes unrenamed.
//   lk_*  a predicted load at decode looks up its synonym (combinational). It
//         sees mappings created by older decode lanes of the same cycle, and
//         not mappings released by stores committing in the same cycle.
//   rl_*  a committing store releases the mapping, only if it still names that
//         store's reservation station.
//   flush clears all mappings (pipeline squash).
// Updates take effect at the clock edge: releases first, then allocations.
//
// The table is fully associative; entries hold synonym, reservation station
// tag, source register name and a valid bit. Size and fields follow the
// cloaking scheme; associativity, the full policy and flush are this
// design's choices.
module srt #(
  parameter int unsigned ENTRIES = 128,
  parameter int unsigned LANES   = 4,
  parameter int unsigned SYN_W   = 12,
  parameter int unsigned RS_W    = 7,
  parameter int unsigned PTAG_W  = 7
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         flush,
  input  logic [LANES-1:0]             al_valid,
  input  logic [LANES-1:0][SYN_W-1:0]  al_syn,
  input  logic [LANES-1:0][RS_W-1:0]   al_rs,
  input  logic [LANES-1:0][PTAG_W-1:0] al_ptag,
  output logic [LANES-1:0]             al_ok,
  input  logic [LANES-1:0]             lk_valid,
  input  logic [LANES-1:0][SYN_W-1:0]  lk_syn,
  output logic [LANES-1:0]             lk_hit,
  output logic [LANES-1:0][RS_W-1:0]   lk_rs,
  output logic [LANES-1:0][PTAG_W-1:0] lk_ptag,
  input  logic [LANES-1:0]             rl_valid,
  input  logic [LANES-1:0][SYN_W-1:0]  rl_syn,
  input  logic [LANES-1:0][RS_W-1:0]   rl_rs
);
  localparam int unsigned IDX_W = $clog2(ENTRIES);

  logic [SYN_W-1:0]  syn_q  [ENTRIES];
  logic [RS_W-1:0]   rs_q   [ENTRIES];
  logic [PTAG_W-1:0] ptag_q [ENTRIES];
  logic [ENTRIES-1:0] valid_q;

  // Entries released this cycle.
  logic [ENTRIES-1:0] rel;
  always_comb begin
    rel = '0;
    for (int e = 0; e < ENTRIES; e++) begin
      for (int l = 0; l < LANES; l++) begin
        if (rl_valid[l] && valid_q[e] && syn_q[e] == rl_syn[l] && rs_q[e] == rl_rs[l]) rel[e] = 1'b1;
      end
    end
  end

  // Allocation: reuse the synonym's entry (or an older lane's choice), else a
  // free entry no older lane took.
  logic [LANES-1:0][IDX_W-1:0] al_idx;
  always_comb begin
    logic [ENTRIES-1:0] taken;
    logic               found;
    logic [LANES-1:0]   ok;
    ok    = '0;
    taken = '0;
    found = 1'b0;
    for (int l = 0; l < LANES; l++) begin
      found     = 1'b0;
      al_idx[l] = '0;
      for (int e = 0; e < ENTRIES; e++) begin
        if (!found && valid_q[e] && !rel[e] && syn_q[e] == al_syn[l]) begin
          found = 1'b1;  al_idx[l] = IDX_W'(e);
        end
      end
      for (int j = 0; j < l; j++) begin
        if (ok[j] && al_syn[j] == al_syn[l]) begin
          found = 1'b1;  al_idx[l] = al_idx[j];
        end
      end
      for (int e = 0; e < ENTRIES; e++) begin
        if (!found && !taken[e] && (!valid_q[e] || rel[e])) begin
          found = 1'b1;  al_idx[l] = IDX_W'(e);
        end
      end
      ok[l] = al_valid[l] && found;
      if (ok[l]) taken[al_idx[l]] = 1'b1;
    end
    al_ok = ok;
  end

  // Lookup.
  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      lk_hit[l]  = 1'b0;
      lk_rs[l]   = '0;
      lk_ptag[l] = '0;
      for (int e = 0; e < ENTRIES; e++) begin
        if (valid_q[e] && !rel[e] && syn_q[e] == lk_syn[l]) begin
          lk_hit[l]  = 1'b1;
          lk_rs[l]   = rs_q[e];
          lk_ptag[l] = ptag_q[e];
        end
      end
      for (int j = 0; j < l; j++) begin
        if (al_ok[j] && al_syn[j] == lk_syn[l]) begin
          lk_hit[l]  = 1'b1;
          lk_rs[l]   = al_rs[j];
          lk_ptag[l] = al_ptag[j];
        end
      end
      if (!lk_valid[l]) begin
        lk_hit[l]  = 1'b0;
        lk_rs[l]   = '0;
        lk_ptag[l] = '0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || flush) begin
      valid_q <= '0;
    end else begin
      valid_q <= valid_q & ~rel;
      for (int l = 0; l < LANES; l++) begin
        if (al_ok[l]) begin
          valid_q[al_idx[l]] <= 1'b1;
          syn_q[al_idx[l]]   <= al_syn[l];
          rs_q[al_idx[l]]    <= al_rs[l];
          ptag_q[al_idx[l]]  <= al_ptag[l];
        end
      end
    end
  end

endmodule
