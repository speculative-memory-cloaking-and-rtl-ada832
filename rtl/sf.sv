// sf: Synonym File.
//
// Small set-associative storage that holds the value communicated under each
// synonym. Each entry has a name (the synonym bits above the set index), a
// value, a full/empty bit and a valid bit. A store predicted to have a
// dependence creates a new, empty version of its synonym when it is decoded
// (al_*); when the store commits it writes its value and marks the entry full
// (wr_*). A load predicted to depend on a store reads the entry by synonym
// (rd_*) and, if it is full, can hand the value to its consumers at once.
//
// Interface and timing: LANES ports of each kind. Reads are combinational and
// see the operations presented in the same cycle: all commit writes (older in
// program order than anything being decoded) and the allocations of older
// decode lanes. Writes and allocations take effect at the clock edge, in the
// order commit lanes 0..LANES-1, then decode lanes 0..LANES-1.
//
// Design choices: on a miss the first invalid way that no other operation of
// the cycle uses is taken, else the way under a per-set round-robin pointer;
// when a set runs out of ways in one cycle the extra operation is dropped
// (the value is then simply not available for cloaking). Reset clears the
// valid bits.
module sf #(
  parameter int unsigned ENTRIES = 1024,
  parameter int unsigned WAYS    = 2,
  parameter int unsigned LANES   = 4,
  parameter int unsigned SYN_W   = 12,
  parameter int unsigned DATA_W  = 32
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [LANES-1:0]             al_valid,
  input  logic [LANES-1:0][SYN_W-1:0]  al_syn,
  input  logic [LANES-1:0]             wr_valid,
  input  logic [LANES-1:0][SYN_W-1:0]  wr_syn,
  input  logic [LANES-1:0][DATA_W-1:0] wr_data,
  input  logic [LANES-1:0]             rd_valid,
  input  logic [LANES-1:0][SYN_W-1:0]  rd_syn,
  output logic [LANES-1:0]             rd_hit,
  output logic [LANES-1:0]             rd_full,
  output logic [LANES-1:0][DATA_W-1:0] rd_data
);
  localparam int unsigned SETS   = ENTRIES / WAYS;
  localparam int unsigned SET_W  = $clog2(SETS);
  localparam int unsigned WAY_W  = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned NAME_W = SYN_W - SET_W;
  localparam int unsigned NOPS   = 2 * LANES;

  logic [NAME_W-1:0] name_q [SETS][WAYS];
  logic [DATA_W-1:0] data_q [SETS][WAYS];
  logic [WAYS-1:0]   full_q [SETS];
  logic [WAYS-1:0]   valid_q[SETS];
  logic [WAY_W-1:0]  rr_q   [SETS];

  // Unified operation list: commit writes first, then decode allocations.
  logic [NOPS-1:0]             op_v, op_wr, op_do, op_hit;
  logic [NOPS-1:0][SYN_W-1:0]  op_syn;
  logic [NOPS-1:0][DATA_W-1:0] op_data;
  logic [NOPS-1:0][WAY_W-1:0]  op_way, op_hway;

  function automatic logic [SET_W-1:0] set_of(input logic [SYN_W-1:0] s);
    return s[SET_W-1:0];
  endfunction
  function automatic logic [NAME_W-1:0] name_of(input logic [SYN_W-1:0] s);
    return s[SYN_W-1:SET_W];
  endfunction

  always_comb begin
    logic            chained, found;
    logic [WAYS-1:0] claimed;
    logic [WAY_W-1:0] rw;
    chained = 1'b0;
    found   = 1'b0;
    claimed = '0;
    rw      = '0;
    for (int k = 0; k < NOPS; k++) begin
      if (k < LANES) begin
        op_v[k] = wr_valid[k];  op_wr[k] = 1'b1;
        op_syn[k] = wr_syn[k];  op_data[k] = wr_data[k];
      end else begin
        op_v[k] = al_valid[k-LANES];  op_wr[k] = 1'b0;
        op_syn[k] = al_syn[k-LANES];  op_data[k] = '0;
      end
      op_hit[k]  = 1'b0;
      op_hway[k] = '0;
      for (int w = 0; w < WAYS; w++) begin
        if (valid_q[set_of(op_syn[k])][w] && name_q[set_of(op_syn[k])][w] == name_of(op_syn[k])) begin
          op_hit[k]  = 1'b1;
          op_hway[k] = WAY_W'(w);
        end
      end
    end
    // way selection, in operation order
    for (int k = 0; k < NOPS; k++) begin
      chained  = 1'b0;
      found    = 1'b0;
      op_do[k] = 1'b0;
      op_way[k] = op_hway[k];
      claimed  = '0;
      for (int j = 0; j < NOPS; j++) begin
        if (op_v[j] && op_hit[j] && set_of(op_syn[j]) == set_of(op_syn[k])) claimed[op_hway[j]] = 1'b1;
      end
      for (int j = 0; j < k; j++) begin
        if (op_do[j] && set_of(op_syn[j]) == set_of(op_syn[k])) claimed[op_way[j]] = 1'b1;
        if (op_do[j] && op_syn[j] == op_syn[k]) begin
          chained   = 1'b1;
          op_way[k] = op_way[j];
        end
      end
      if (op_v[k]) begin
        if (chained || op_hit[k]) begin
          op_do[k] = 1'b1;
        end else begin
          for (int w = 0; w < WAYS; w++) begin
            if (!found && !valid_q[set_of(op_syn[k])][w] && !claimed[w]) begin
              found = 1'b1;  op_way[k] = WAY_W'(w);
            end
          end
          for (int i = 0; i < WAYS; i++) begin
            rw = WAY_W'((32'(rr_q[set_of(op_syn[k])]) + i) % WAYS);
            if (!found && !claimed[rw]) begin
              found = 1'b1;  op_way[k] = rw;
            end
          end
          op_do[k] = found;
        end
      end
    end
  end

  // Reads: stored state, then this cycle's operations in order.
  always_comb begin
    logic [WAY_W-1:0] hw;
    hw = '0;
    for (int l = 0; l < LANES; l++) begin
      hw         = '0;
      rd_hit[l]  = 1'b0;
      rd_full[l] = 1'b0;
      rd_data[l] = '0;
      for (int w = 0; w < WAYS; w++) begin
        if (valid_q[set_of(rd_syn[l])][w] && name_q[set_of(rd_syn[l])][w] == name_of(rd_syn[l])) begin
          rd_hit[l]  = 1'b1;
          hw         = WAY_W'(w);
          rd_full[l] = full_q[set_of(rd_syn[l])][w];
          rd_data[l] = data_q[set_of(rd_syn[l])][w];
        end
      end
      for (int k = 0; k < LANES + l; k++) begin
        if (op_do[k] && op_syn[k] == rd_syn[l]) begin
          rd_hit[l]  = 1'b1;
          rd_full[l] = op_wr[k];
          rd_data[l] = op_wr[k] ? op_data[k] : '0;
        end else if (op_do[k] && rd_hit[l] && set_of(op_syn[k]) == set_of(rd_syn[l]) &&
                     op_way[k] == hw && op_syn[k] != rd_syn[l]) begin
          rd_hit[l]  = 1'b0;   // entry evicted by this cycle's operation
          rd_full[l] = 1'b0;
          rd_data[l] = '0;
        end
      end
      if (!rd_valid[l]) begin
        rd_hit[l]  = 1'b0;
        rd_full[l] = 1'b0;
        rd_data[l] = '0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        valid_q[s] <= '0;
        full_q[s]  <= '0;
        rr_q[s]    <= '0;
      end
    end else begin
      for (int k = 0; k < NOPS; k++) begin
        if (op_do[k]) begin
          valid_q[set_of(op_syn[k])][op_way[k]] <= 1'b1;
          name_q[set_of(op_syn[k])][op_way[k]]  <= name_of(op_syn[k]);
          full_q[set_of(op_syn[k])][op_way[k]]  <= op_wr[k];
          if (op_wr[k]) data_q[set_of(op_syn[k])][op_way[k]] <= op_data[k];
          if (!op_hit[k]) rr_q[set_of(op_syn[k])] <= WAY_W'((32'(op_way[k]) + 1) % WAYS);
        end
      end
    end
  end

endmodule
