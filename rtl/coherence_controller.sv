// coherence_controller: MSI coherency controller for two cores sharing one
// main memory.
//
// Every cycle the controller looks at each core's access together with the
// coherency tag lookup (does the address match the tag in the core's own copy,
// in the other core's copy, and what is the line's 5-bit state). A load that
// finds the core holding the line (state St1/St5 of the protocol table) and a
// store that finds the line modified by that same core complete at once, with
// no stall. Every other access stalls its core and starts a transaction. Only
// one transaction runs at a time; if both cores need one in the same cycle the
// core not served last goes first (round robin).
//
// A transaction is classified into the protocol cases St0..St15 (coh_case_e)
// and then runs these steps, skipping those it does not need:
//   FLUSH  the other core holds the line modified: write its copy back to
//          memory (MSI "send data" on a remote read or write).
//   WB     this core's cache holds a different line at the index, which it
//          modified: write that victim back (MSI eviction from M). A clean
//          victim is dropped silently.
//   FILL   this core does not hold the line: read it from memory and fill the
//          cache (BusRd for a load, BusRdX for a store). A store to a line it
//          holds clean (S -> M) needs no fill, only the invalidation.
//   UPDATE write the new state into every coherency tag entry that names the
//          line, invalidate the other core's copy for a store, and update the
//          other copy's entry for a dropped victim.
//   DONE   one cycle in which the waiting core's access completes as a hit
//          while the other core is held, so the core always makes progress.
// New states: a load makes the core a reader (no holder -> held by this core
// only; held clean or modified by the other core -> shared); a store makes the
// line modified by this core. coh_stall is high while a transaction runs.
//
// What follows the original design: the 5-bit state word, the case numbering, the
// MSI rules (modified + remote read -> write back, shared; modified + remote
// write -> write back, invalid; shared + remote write -> invalid; eviction of
// modified -> write back; shared -> silent drop), stall1/stall2 and CohStall.
// This design's own choices: the step sequence, one transaction at a time,
// round-robin choice, the line-wide memory handshake (see main_memory) and
// the single DONE cycle. A line modified by the other core and then loaded
// ends shared, as the MSI transition rules state, where one row of the
// original case table lists "held by core 2 only" instead.
module coherence_controller
  import msi_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  // core requests (InMP1Re/InMP1Wr/InMP1A, InMP2...)
  input  logic      mp_re   [NCORES],
  input  logic      mp_we   [NCORES],
  input  addr_t     mp_addr [NCORES],
  output logic      stall   [NCORES],
  output logic      coh_stall,
  output coh_case_e coh_case,
  // coherency tag lookup and update
  input  logic      mp_hit   [NCORES][NCORES],
  input  msi_t      look_msi [NCORES][NCORES],
  input  tag_t      look_tag [NCORES][NCORES],
  output logic      tag_wr_en   [NCORES],
  output addr_t     tag_wr_addr [NCORES],
  output msi_t      tag_wr_msi  [NCORES],
  // data caches
  output index_t    coh_idx,
  input  line_t     cache_line [NCORES],
  output logic      fill_en    [NCORES],
  output tag_t      fill_tag,
  output logic      inval_en   [NCORES],
  // main memory
  output logic      mem_req,
  output logic      mem_we,
  output addr_t     mem_addr,
  output line_t     mem_wdata,
  input  logic      mem_ack
);

  typedef enum logic [2:0] {
    C_IDLE, C_FLUSH, C_WB, C_FILL, C_UPDATE, C_DONE
  } ctrl_state_e;

  ctrl_state_e state_q, state_d;

  // captured transaction
  logic      cur_q;          // requesting core
  addr_t     addr_q;
  logic      wr_q;
  msi_t      st_q;           // state of the requested line before the transaction
  logic      hp_q, hq_q;     // address found in own / other tag copy
  msi_t      vmsi_q;         // state of this core's entry at the index (victim)
  tag_t      vtag_q;
  logic      vin_q;          // other copy's entry names the victim line
  coh_case_e case_q;
  logic      last_q;         // core served last (round robin)

  // per-core classification of the current request
  logic      req   [NCORES];
  logic      need  [NCORES];
  msi_t      st_c  [NCORES];
  coh_case_e case_c[NCORES];

  always_comb begin
    for (int p = 0; p < NCORES; p++) begin
      logic hp, hq, fast;
      hp = mp_hit[p][p];
      hq = mp_hit[p][1-p];
      st_c[p] = hp ? look_msi[p][p] : (hq ? look_msi[p][1-p] : MSI_NONE);
      fast = hp && (mp_we[p] ? msi_modified_by(st_c[p], p[0])
                             : msi_holds(st_c[p], p[0]));
      req[p]  = mp_re[p] || mp_we[p];
      need[p] = req[p] && !fast;
      // protocol case: core 1 uses St0-3/8-9/12-13, core 2 St4-7/10-11/14-15
      if (!(hp || hq))
        case_c[p] = coh_case_e'((p == 0 ? 12 : 14) + (mp_we[p] ? 1 : 0));
      else if (mp_we[p])
        case_c[p] = coh_case_e'((p == 0 ? 8 : 10) + (msi_modified_by(st_c[p], !p[0]) ? 1 : 0));
      else if (st_c[p] == MSI_NONE)
        case_c[p] = coh_case_e'(p == 0 ? 0 : 4);
      else if (msi_holds(st_c[p], p[0]))
        case_c[p] = coh_case_e'(p == 0 ? 1 : 5);
      else if (msi_modified_by(st_c[p], !p[0]))
        case_c[p] = coh_case_e'(p == 0 ? 3 : 7);
      else
        case_c[p] = coh_case_e'(p == 0 ? 2 : 6);
    end
  end

  // which core starts a transaction this cycle
  logic start, pick;
  always_comb begin
    start = need[0] || need[1];
    if (need[0] && need[1]) pick = !last_q;
    else                    pick = need[1];
  end

  // steps the captured transaction needs
  logic q_c;
  logic wb_n, fill_n;
  assign q_c     = !cur_q;
  assign wb_n    = !hp_q && msi_modified_by(vmsi_q, cur_q);
  assign fill_n  = !(hp_q && msi_holds(st_q, cur_q));

  // first step of a transaction, from the live lookup of the chosen core
  ctrl_state_e first_step;
  always_comb begin
    if (msi_modified_by(st_c[pick], !pick))
      first_step = C_FLUSH;
    else if (!mp_hit[pick][pick] && msi_modified_by(look_msi[pick][pick], pick))
      first_step = C_WB;
    else if (!(mp_hit[pick][pick] && msi_holds(st_c[pick], pick)))
      first_step = C_FILL;
    else
      first_step = C_UPDATE;
  end

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      C_IDLE:   if (start) state_d = first_step;
      C_FLUSH:  if (mem_ack) state_d = wb_n ? C_WB : (fill_n ? C_FILL : C_UPDATE);
      C_WB:     if (mem_ack) state_d = fill_n ? C_FILL : C_UPDATE;
      C_FILL:   if (mem_ack) state_d = C_UPDATE;
      C_UPDATE: state_d = C_DONE;
      C_DONE:   state_d = C_IDLE;
      default:  state_d = C_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q <= C_IDLE;
      last_q  <= 1'b1;
      case_q  <= ST400;
      cur_q   <= 1'b0;
      addr_q  <= '0;
      wr_q    <= 1'b0;
      st_q    <= MSI_NONE;
      hp_q    <= 1'b0;
      hq_q    <= 1'b0;
      vmsi_q  <= MSI_NONE;
      vtag_q  <= '0;
      vin_q   <= 1'b0;
    end else begin
      state_q <= state_d;
      if (state_q == C_IDLE && start) begin
        cur_q  <= pick;
        last_q <= pick;
        addr_q <= mp_addr[pick];
        wr_q   <= mp_we[pick];
        st_q   <= st_c[pick];
        hp_q   <= mp_hit[pick][pick];
        hq_q   <= mp_hit[pick][!pick];
        vmsi_q <= look_msi[pick][pick];
        vtag_q <= look_tag[pick][pick];
        vin_q  <= look_tag[pick][!pick] == look_tag[pick][pick];
        case_q <= case_c[pick];
      end else if (state_q == C_DONE) begin
        case_q <= ST400;
      end
    end
  end

  // the state the requested line ends in
  msi_t new_st;
  assign new_st = wr_q ? msi_mod(cur_q) : msi_add_reader(st_q, cur_q);

  assign coh_idx  = addr_index(addr_q);
  assign fill_tag = addr_tag(addr_q);

  always_comb begin
    mem_req   = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = '0;
    mem_wdata = cache_line[cur_q];
    for (int j = 0; j < NCORES; j++) begin
      fill_en[j]     = 1'b0;
      inval_en[j]    = 1'b0;
      tag_wr_en[j]   = 1'b0;
      tag_wr_addr[j] = addr_q;
      tag_wr_msi[j]  = new_st;
    end
    unique case (state_q)
      C_FLUSH: begin
        mem_req   = 1'b1;
        mem_we    = 1'b1;
        mem_addr  = {addr_tag(addr_q), addr_index(addr_q), OFFSET_W'(0)};
        mem_wdata = cache_line[q_c];
      end
      C_WB: begin
        mem_req   = 1'b1;
        mem_we    = 1'b1;
        mem_addr  = {vtag_q, addr_index(addr_q), OFFSET_W'(0)};
        mem_wdata = cache_line[cur_q];
      end
      C_FILL: begin
        mem_req  = 1'b1;
        mem_addr = {addr_tag(addr_q), addr_index(addr_q), OFFSET_W'(0)};
        fill_en[cur_q] = mem_ack;
      end
      C_UPDATE: begin
        tag_wr_en[cur_q] = 1'b1;
        if (hq_q) begin
          tag_wr_en[q_c] = 1'b1;
          inval_en[q_c]  = wr_q && msi_holds(st_q, q_c);
        end else if (!hp_q && vin_q) begin
          // the victim line is still named by the other copy
          tag_wr_en[q_c]   = 1'b1;
          tag_wr_addr[q_c] = {vtag_q, addr_index(addr_q), OFFSET_W'(0)};
          tag_wr_msi[q_c]  = msi_drop(vmsi_q, cur_q);
        end
      end
      default: ;
    endcase
  end

  always_comb begin
    coh_stall = state_q != C_IDLE;
    coh_case  = case_q;
    for (int p = 0; p < NCORES; p++)
      stall[p] = req[p] && (need[p] ||
                 (state_q != C_IDLE && !(state_q == C_DONE && cur_q == p[0])));
  end

  // rules of the interface and of the protocol
  always_ff @(posedge clk) begin
    if (!rst) begin
      for (int p = 0; p < NCORES; p++)
        assert (!(mp_re[p] && mp_we[p]))
          else $error("coherence_controller: core %0d reads and writes at once", p);
      if (state_q == C_UPDATE)
        assert (new_st inside {MSI_ONLY1, MSI_ONLY2, MSI_SHARED, MSI_MOD1, MSI_MOD2})
          else $error("coherence_controller: illegal new state %b", new_st);
      if (state_q == C_DONE)
        assert (!need[cur_q] || !req[cur_q])
          else $error("coherence_controller: access still misses after its transaction");
    end
  end

endmodule
