// dpnt: Dependence Prediction and Naming Table.
//
// Every load and store that has been seen in a memory dependence owns an entry
// tagged by its PC. The entry holds a dependence predictor (PRED) saying
// whether the instruction should take part in cloaking, and a dependence tag
// (DTAG), the synonym that names all dependences of the instruction.
//
// Lookup (LANES ports, combinational): by PC, at the front of the pipeline.
// lk_predict is set when the entry exists and its predictor allows cloaking.
// lk_syn is valid whenever lk_hit is set, so a load that is not allowed to use
// its synonym can still be checked in the shadow.
//
// Update (LANES ports, at commit, lane 0 oldest): a committing load presents
// its PC, whether the dependence detector found a producing store (and that
// store's PC), and the verification outcome of its own speculation. The lanes
// of one cycle act as if applied one after another: each sees the entries
// written by older lanes. Four accesses per cycle and updates at commit follow
// the method; the in-order rule within a cycle is this design's. Synonyms are
// assigned incrementally: if neither instruction has one a new synonym is allocated;
// if one has one it is given to the other; if both have different ones the
// smaller is given to both, so related dependences converge on one name.
// Updates are written at the clock edge and visible to lookups the next cycle.
//
// Predictor (a four-state automaton per entry; the state assignment is this
// design's reading of the scheme): a new load entry starts in state 2, so
// cloaking is used the next time; cloaking is used in states 2 and 3; a
// correct outcome moves one state up, a wrong one drops to state 0, from where
// two correct outcomes are needed before cloaking is used again. Store entries
// start in state 3 and are not changed by load outcomes.
//
// Organisation: ENTRIES entries in WAYS-way sets, set index from pc[..:2]; on a
// miss the first invalid way is used, else a per-set round-robin pointer
// picks the victim. Synonyms come from a wrapping counter of SYN_W bits.
module dpnt
  import cloak_pkg::*;
#(
  parameter int unsigned ENTRIES = 4096,
  parameter int unsigned WAYS    = 2,
  parameter int unsigned LANES   = 4,
  parameter int unsigned PC_W    = 32,
  parameter int unsigned SYN_W   = 12
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // lookup
  input  logic [LANES-1:0][PC_W-1:0]  lk_pc,
  output logic [LANES-1:0]            lk_hit,
  output logic [LANES-1:0]            lk_predict,
  output logic [LANES-1:0][SYN_W-1:0] lk_syn,
  // update, one port per commit lane
  input  logic [LANES-1:0]            up_valid,
  input  logic [LANES-1:0][PC_W-1:0]  up_ld_pc,
  input  logic [LANES-1:0]            up_dep,
  input  logic [LANES-1:0][PC_W-1:0]  up_st_pc,
  input  outcome_e [LANES-1:0]        up_outcome,
  // events
  output logic [LANES-1:0]            ev_new_syn,
  output logic [LANES-1:0]            ev_merge
);
  localparam int unsigned SETS  = ENTRIES / WAYS;
  localparam int unsigned SET_W = $clog2(SETS);
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned TAG_W = PC_W - 2 - SET_W;
  localparam logic [1:0]  PRED_LOAD_INIT  = 2'd2;
  localparam logic [1:0]  PRED_STORE_INIT = 2'd3;

  typedef struct packed {
    logic [TAG_W-1:0] tag;
    logic [1:0]       pred;
    logic [SYN_W-1:0] dtag;
  } entry_t;

  entry_t            mem_q   [SETS][WAYS];
  logic [WAYS-1:0]   valid_q [SETS];
  logic [WAY_W-1:0]  rr_q    [SETS];
  logic [SYN_W-1:0]  next_syn_q;

  function automatic logic [SET_W-1:0] set_of(input logic [PC_W-1:0] pc);
    return pc[SET_W+1:2];
  endfunction
  function automatic logic [TAG_W-1:0] tag_of(input logic [PC_W-1:0] pc);
    return pc[PC_W-1:SET_W+2];
  endfunction

  // ---------------- lookup ----------------
  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      lk_hit[l]     = 1'b0;
      lk_predict[l] = 1'b0;
      lk_syn[l]     = '0;
      for (int w = 0; w < WAYS; w++) begin
        if (valid_q[set_of(lk_pc[l])][w] &&
            mem_q[set_of(lk_pc[l])][w].tag == tag_of(lk_pc[l])) begin
          lk_hit[l]     = 1'b1;
          lk_predict[l] = mem_q[set_of(lk_pc[l])][w].pred[1];
          lk_syn[l]     = mem_q[set_of(lk_pc[l])][w].dtag;
        end
      end
    end
  end

  // ---------------- update ----------------
  // Updates are applied in lane order. Each one sees the table as left by the
  // older lanes of the same cycle: the stored state overlaid with the pending
  // writes of those lanes (two per lane: load entry, then store entry).
  localparam int unsigned NPW = 2 * LANES;

  logic [NPW-1:0]            pw_v, pw_alloc;
  logic [NPW-1:0][SET_W-1:0] pw_set;
  logic [NPW-1:0][WAY_W-1:0] pw_way;
  entry_t [NPW-1:0]          pw_ent;
  logic [SYN_W-1:0]          next_syn_d;

  always_comb begin
    logic [SET_W-1:0]   ls, ss;
    logic [WAYS-1:0]    lv, sv;
    entry_t [WAYS-1:0]  le, se;
    logic [WAY_W-1:0]   lrr, srr, lway, sway;
    logic               lhit, shit, lfound, sfound, take_new;
    logic [SYN_W-1:0]   syn, nsyn;
    entry_t             lent, sent;
    ls = '0;  ss = '0;  lv = '0;  sv = '0;  le = '0;  se = '0;
    lrr = '0;  srr = '0;  lway = '0;  sway = '0;
    lhit = 1'b0;  shit = 1'b0;  lfound = 1'b0;  sfound = 1'b0;  take_new = 1'b0;
    syn = '0;  lent = '0;  sent = '0;
    nsyn       = next_syn_q;
    pw_v       = '0;
    pw_alloc   = '0;
    pw_set     = '0;
    pw_way     = '0;
    pw_ent     = '0;
    ev_new_syn = '0;
    ev_merge   = '0;
    for (int k = 0; k < LANES; k++) begin
      ls = set_of(up_ld_pc[k]);
      ss = set_of(up_st_pc[k]);
      // view of both sets after the older lanes
      lrr = rr_q[ls];
      srr = rr_q[ss];
      for (int w = 0; w < WAYS; w++) begin
        lv[w] = valid_q[ls][w];  le[w] = mem_q[ls][w];
        sv[w] = valid_q[ss][w];  se[w] = mem_q[ss][w];
      end
      for (int j = 0; j < 2 * k; j++) begin
        if (pw_v[j] && pw_set[j] == ls) begin
          lv[pw_way[j]] = 1'b1;  le[pw_way[j]] = pw_ent[j];
          if (pw_alloc[j]) lrr = WAY_W'((32'(pw_way[j]) + 1) % WAYS);
        end
        if (pw_v[j] && pw_set[j] == ss) begin
          sv[pw_way[j]] = 1'b1;  se[pw_way[j]] = pw_ent[j];
          if (pw_alloc[j]) srr = WAY_W'((32'(pw_way[j]) + 1) % WAYS);
        end
      end
      lhit = 1'b0;  lway = '0;  lfound = 1'b0;
      shit = 1'b0;  sway = '0;  sfound = 1'b0;
      for (int w = 0; w < WAYS; w++) begin
        if (lv[w] && le[w].tag == tag_of(up_ld_pc[k])) begin
          lhit = 1'b1;  lway = WAY_W'(w);
        end
        if (sv[w] && se[w].tag == tag_of(up_st_pc[k])) begin
          shit = 1'b1;  sway = WAY_W'(w);
        end
      end
      // victims on a miss: first invalid way, else the round-robin way; the
      // load and the store of one update never take each other's way
      if (!lhit) begin
        lway = lrr;
        for (int w = 0; w < WAYS; w++) begin
          if (!lfound && !lv[w]) begin
            lfound = 1'b1;  lway = WAY_W'(w);
          end
        end
      end
      if (!lhit && shit && ss == ls && lway == sway) lway = WAY_W'((32'(lway) + 1) % WAYS);
      if (!shit) begin
        sway = srr;
        for (int w = 0; w < WAYS; w++) begin
          if (!sfound && !sv[w] && !(ss == ls && WAY_W'(w) == lway)) begin
            sfound = 1'b1;  sway = WAY_W'(w);
          end
        end
        if (!sfound && ss == ls && sway == lway) sway = WAY_W'((32'(sway) + 1) % WAYS);
      end

      // synonym assignment
      take_new = 1'b0;
      if (lhit && shit) begin
        syn = (le[lway].dtag < se[sway].dtag) ? le[lway].dtag : se[sway].dtag;
        ev_merge[k] = up_valid[k] && up_dep[k] && (le[lway].dtag != se[sway].dtag);
      end else if (lhit) begin
        syn = le[lway].dtag;
      end else if (shit) begin
        syn = se[sway].dtag;
      end else begin
        syn      = nsyn;
        take_new = 1'b1;
      end
      ev_new_syn[k] = up_valid[k] && up_dep[k] && take_new;
      if (ev_new_syn[k]) nsyn = nsyn + 1'b1;

      // load entry: created by a dependence, trained by the outcome
      lent = lhit ? le[lway] : '{tag: tag_of(up_ld_pc[k]), pred: PRED_LOAD_INIT, dtag: syn};
      if (up_dep[k]) lent.dtag = syn;
      if (lhit) begin
        unique case (up_outcome[k])
          OUT_CORRECT: if (lent.pred != 2'd3) lent.pred = lent.pred + 2'd1;
          OUT_WRONG:   lent.pred = 2'd0;
          default:     ;
        endcase
      end
      // store entry
      sent = shit ? se[sway] : '{tag: tag_of(up_st_pc[k]), pred: PRED_STORE_INIT, dtag: syn};
      sent.dtag = syn;

      pw_v[2*k]       = up_valid[k] && (lhit || up_dep[k]);
      pw_alloc[2*k]   = !lhit;
      pw_set[2*k]     = ls;
      pw_way[2*k]     = lway;
      pw_ent[2*k]     = lent;
      pw_v[2*k+1]     = up_valid[k] && up_dep[k];
      pw_alloc[2*k+1] = !shit;
      pw_set[2*k+1]   = ss;
      pw_way[2*k+1]   = sway;
      pw_ent[2*k+1]   = sent;
    end
    next_syn_d = nsyn;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        valid_q[s] <= '0;
        rr_q[s]    <= '0;
      end
      next_syn_q <= '0;
    end else begin
      for (int j = 0; j < NPW; j++) begin
        if (pw_v[j]) begin
          mem_q[pw_set[j]][pw_way[j]]   <= pw_ent[j];
          valid_q[pw_set[j]][pw_way[j]] <= 1'b1;
          if (pw_alloc[j]) rr_q[pw_set[j]] <= WAY_W'((32'(pw_way[j]) + 1) % WAYS);
        end
      end
      next_syn_q <= next_syn_d;
    end
  end

endmodule
