// ddt: Dependence Detection Table.
//
// Remembers, for the most recently stored-to word addresses, the PC of the
// store that last wrote each word. Committing stores record (word address,
// store PC); committing loads search the table with their own address and, on
// a hit, report the (store PC, load PC) pair as a detected dependence. The
// table is fully associative; each entry holds a word address, a store PC and
// a valid bit, as the cloaking scheme specifies. Its 128-entry default is the
// size used for the combined cloaking/bypassing evaluation.
//
// Interface: LANES commit lanes per cycle, lane 0 oldest in program order.
// A lane is a store (c_is_store=1) or a load. Load results (dep_found,
// dep_stpc) are combinational in the same cycle; a load also sees stores of
// older lanes of the same cycle. Stores update the table at the clock edge.
//
// Design choices not fixed by the scheme: word granularity is addr[ADDR_W-1:2];
// a store to a word already present overwrites that entry's PC, otherwise it
// takes the entry under a first-in first-out pointer (the oldest recorded
// word is forgotten first); reset clears valid bits. The lanes of one cycle
// behave exactly as if they were applied one after another.
module ddt #(
  parameter int unsigned ENTRIES = 128,
  parameter int unsigned LANES   = 4,
  parameter int unsigned ADDR_W  = 32,
  parameter int unsigned PC_W    = 32
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [LANES-1:0]             c_valid,
  input  logic [LANES-1:0]             c_is_store,
  input  logic [LANES-1:0][ADDR_W-1:0] c_addr,
  input  logic [LANES-1:0][PC_W-1:0]   c_pc,
  output logic [LANES-1:0]             dep_found,
  output logic [LANES-1:0][PC_W-1:0]   dep_stpc
);
  localparam int unsigned IDX_W = $clog2(ENTRIES);
  localparam int unsigned WA_W  = ADDR_W - 2;

  logic [WA_W-1:0] addr_q  [ENTRIES];
  logic [PC_W-1:0] stpc_q  [ENTRIES];
  logic [ENTRIES-1:0] valid_q;
  logic [IDX_W-1:0]   wptr_q;

  // Per-lane CAM search of the stored table.
  logic [LANES-1:0]            tbl_hit;
  logic [LANES-1:0][IDX_W-1:0] tbl_idx;

  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      tbl_hit[l] = 1'b0;
      tbl_idx[l] = '0;
      for (int e = 0; e < ENTRIES; e++) begin
        if (valid_q[e] && addr_q[e] == c_addr[l][ADDR_W-1:2]) begin
          tbl_hit[l] = 1'b1;
          tbl_idx[l] = IDX_W'(e);
        end
      end
    end
  end

  // Lanes are applied in program order. A store to a word that an older lane
  // of this cycle also stores to reuses that lane's slot; otherwise it updates
  // its hit entry, unless an older lane's allocation has just evicted it, or
  // allocates the slot under the FIFO pointer.
  logic [LANES-1:0]            st_do;
  logic [LANES-1:0]            st_alloc;
  logic [LANES-1:0][IDX_W-1:0] st_slot;
  logic [IDX_W-1:0]            wptr_d;

  always_comb begin
    logic [IDX_W-1:0] p;
    logic             present;
    p        = wptr_q;
    st_do    = '0;
    st_alloc = '0;
    st_slot  = '0;
    present  = 1'b0;
    for (int l = 0; l < LANES; l++) begin
      // where this lane's word lives after the older lanes of the cycle
      present     = tbl_hit[l];
      st_slot[l]  = tbl_idx[l];
      dep_stpc[l] = stpc_q[tbl_idx[l]];
      for (int j = 0; j < l; j++) begin
        if (st_do[j] && c_addr[j][ADDR_W-1:2] == c_addr[l][ADDR_W-1:2]) begin
          present     = 1'b1;
          st_slot[l]  = st_slot[j];
          dep_stpc[l] = c_pc[j];
        end else if (st_alloc[j] && present && st_slot[j] == st_slot[l]) begin
          present = 1'b0;   // evicted by an older lane's allocation
        end
      end
      st_do[l]    = c_valid[l] && c_is_store[l];
      st_alloc[l] = st_do[l] && !present;
      if (st_alloc[l]) begin
        st_slot[l] = p;
        p = (p == IDX_W'(ENTRIES - 1)) ? '0 : p + 1'b1;
      end
      dep_found[l] = c_valid[l] && !c_is_store[l] && present;
      if (!dep_found[l]) dep_stpc[l] = '0;
    end
    wptr_d = p;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid_q <= '0;
      wptr_q  <= '0;
    end else begin
      for (int l = 0; l < LANES; l++) begin
        if (st_do[l]) begin
          valid_q[st_slot[l]] <= 1'b1;
          addr_q[st_slot[l]]  <= c_addr[l][ADDR_W-1:2];
          stpc_q[st_slot[l]]  <= c_pc[l];
        end
      end
      wptr_q <= wptr_d;
    end
  end

endmodule
