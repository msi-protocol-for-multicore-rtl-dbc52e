// tb_top_level: end-to-end test of the dual-core coherent data memory system
// at its default parameters.
//
// Two core models drive loads and stores and hold each access while it is
// stalled. A flat reference memory, updated in the order accesses complete,
// predicts every load result, so any lost write-back, stale copy or missed
// invalidation shows up as a wrong load value.
//
// Phase 1 (directed): one access at a time walks through every protocol case
// St0..St15 (MIPS1 = core 0, MIPS2 = core 1) and checks the case the controller
// reports, the coherence state left in the tag store and the access latency:
// 1 cycle for a hit, otherwise 3 + m*(MEM_LATENCY+2) cycles for a transaction
// with m memory line transfers.
// Phase 2 (random): both cores issue random byte/halfword/word accesses to a
// few lines that collide on two cache indices, so evictions, flushes, sharing,
// invalidations and simultaneous requests all happen many times.
// Every cycle without a running transaction, each cache's valid bits and tags
// are compared with the duplicate tag store, and a line valid in both caches
// must be SHARED. Every mechanism is counted and a failure is counted for one
// never seen.
module tb_top_level;
  import msi_pkg::*;

  localparam int LAT = 2;            // default MEM_LATENCY of top_level
  localparam int RANDOM_OPS = 4000;  // accesses per core in phase 2

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic [1:0]        mp_memread, mp_memwrite;
  logic [1:0][31:0]  mp_dataadr, mp_writedata, mp_readdata;
  logic [1:0][1:0]   mp_size;
  logic [1:0]        mp_stall;
  logic              coh_stall;
  coh_case_e         coh_case;
  msi_t [1:0]        out_msi;

  top_level dut (
    .clk, .rst, .mp_memread, .mp_memwrite, .mp_dataadr, .mp_writedata,
    .mp_size, .mp_readdata, .mp_stall, .coh_stall, .coh_case, .out_msi
  );

  int checks = 0, failures = 0;
  int unsigned cyc = 0;

  // ---------------- reference memory ----------------
  logic [31:0] ref_mem [int unsigned];

  function automatic logic [31:0] ref_word(input logic [31:0] a);
    return ref_mem.exists(a >> 2) ? ref_mem[a >> 2] : 32'h0;
  endfunction

  function automatic logic [31:0] expect_load(input logic [31:0] a, input logic [1:0] sz);
    logic [31:0] w;
    w = ref_word(a) >> (8 * a[1:0]);
    case (sz)
      2'd0:    return {24'b0, w[7:0]};
      2'd1:    return {16'b0, w[15:0]};
      default: return w;
    endcase
  endfunction

  function automatic void ref_store(input logic [31:0] a, input logic [1:0] sz, input logic [31:0] d);
    logic [31:0] w;
    w = ref_word(a);
    case (sz)
      2'd0:    w[8*a[1:0] +: 8]  = d[7:0];
      2'd1:    w[8*a[1:0] +: 16] = d[15:0];
      default: w = d;
    endcase
    ref_mem[a >> 2] = w;
  endfunction

  // ---------------- core models ----------------
  typedef struct {
    bit          valid;
    bit          we;
    logic [31:0] addr;
    logic [1:0]  size;
    logic [31:0] data;
    int unsigned start;
  } op_t;

  op_t cur [2];
  int  last_lat [2];
  bit  random_mode = 0;
  int  issued [2];

  // mechanism counters
  int case_cnt [32];
  int fast_read [2], fast_write [2];
  int n_flush = 0, n_wb = 0, n_fill = 0, n_inval = 0, n_upgrade = 0;
  int n_silent = 0, n_both_need = 0, n_stall_cycles = 0, n_byte = 0, n_half = 0;
  coh_case_e last_case;
  bit prev_coh_stall = 0;

  function automatic op_t random_op();
    op_t o;
    logic [1:0] idx, tag, word;
    idx  = 2'($urandom_range(0, 1));
    tag  = 2'($urandom_range(0, 3));
    word = 2'($urandom_range(0, 3));
    o.valid = 1;
    o.we    = ($urandom_range(0, 99) < 40);
    o.size  = 2'($urandom_range(0, 2));
    o.addr  = {24'b0, tag, idx, word, 2'b00};
    if (o.size == 2'd0) o.addr[1:0] = 2'($urandom_range(0, 3));
    if (o.size == 2'd1) o.addr[1]   = 1'($urandom_range(0, 1));
    o.data  = $urandom;
    return o;
  endfunction

  // one clock cycle: drive, then observe in the middle of the cycle
  task automatic run_cycle();
    @(posedge clk);
    #1;
    cyc++;
    for (int p = 0; p < 2; p++) begin
      if (!cur[p].valid && random_mode && issued[p] < RANDOM_OPS && $urandom_range(0, 3) != 0) begin
        cur[p] = random_op();
        cur[p].start = cyc;
        issued[p]++;
      end
      mp_memread[p]   = cur[p].valid && !cur[p].we;
      mp_memwrite[p]  = cur[p].valid &&  cur[p].we;
      mp_dataadr[p]   = cur[p].addr;
      mp_size[p]      = cur[p].size;
      mp_writedata[p] = cur[p].data;
    end
    @(negedge clk);
    // mechanisms
    if (coh_stall && !prev_coh_stall) begin
      last_case = coh_case;
      case_cnt[coh_case]++;
    end
    prev_coh_stall = coh_stall;
    case (int'(dut.u_coherence_controller.state_q))
      1: if (dut.mem_ack) n_flush++;
      2: if (dut.mem_ack) n_wb++;
      3: if (dut.mem_ack) n_fill++;
      4: if (!dut.u_coherence_controller.hp_q &&
             msi_holds(dut.u_coherence_controller.vmsi_q, dut.u_coherence_controller.cur_q) &&
             !msi_modified_by(dut.u_coherence_controller.vmsi_q, dut.u_coherence_controller.cur_q))
           n_silent++;
      default: ;
    endcase
    if (int'(dut.u_coherence_controller.state_q) == 0 && dut.u_coherence_controller.need[0]
        && dut.u_coherence_controller.need[1]) n_both_need++;
    if (dut.u_coherence_controller.state_q == 0 && dut.u_coherence_controller.start
        && dut.u_coherence_controller.first_step == 4) n_upgrade++;
    if (dut.inval_en[0] || dut.inval_en[1]) n_inval++;
    if (mp_stall != 0) n_stall_cycles++;
    check_invariants();
    // completions: loads are checked before this cycle's stores are applied
    for (int p = 0; p < 2; p++)
      if (cur[p].valid && !mp_stall[p] && !cur[p].we) begin
        checks++;
        if (mp_readdata[p] !== expect_load(cur[p].addr, cur[p].size)) begin
          failures++;
          $display("FAIL cycle %0d core %0d load %h size %0d: got %h expected %h", cyc, p,
                   cur[p].addr, cur[p].size, mp_readdata[p], expect_load(cur[p].addr, cur[p].size));
        end
      end
    for (int p = 0; p < 2; p++)
      if (cur[p].valid && !mp_stall[p]) begin
        if (cur[p].we) ref_store(cur[p].addr, cur[p].size, cur[p].data);
        last_lat[p] = int'(cyc - cur[p].start) + 1;
        if (last_lat[p] == 1) begin
          if (cur[p].we) fast_write[p]++; else fast_read[p]++;
        end
        if (cur[p].size == 2'd0) n_byte++;
        if (cur[p].size == 2'd1) n_half++;
        cur[p].valid = 0;
      end
  endtask

  // Coherence invariants, checked every cycle once no transaction is running:
  // each cache line is valid with tag T exactly when its duplicate tag entry
  // names T with a state in which that core holds the line, and two valid
  // copies of one line are always clean (SHARED).
  int n_inv = 0;
  task automatic check_invariants();
    if (coh_stall) return;
    for (int k = 0; k < NUM_LINES; k++) begin
      logic v [2];
      tag_t t [2];
      v[0] = dut.g_core[0].u_dcache.valid_q[k];
      v[1] = dut.g_core[1].u_dcache.valid_q[k];
      t[0] = dut.g_core[0].u_dcache.tag_q[k];
      t[1] = dut.g_core[1].u_dcache.tag_q[k];
      for (int j = 0; j < 2; j++) begin
        msi_t st;
        logic holds;
        st = dut.u_coherence_tag.msi_q[j][k];
        holds = (j == 0) ? (st.s || st.i == 2'b01 || st.m == 2'b01)
                         : (st.s || st.i == 2'b10 || st.m == 2'b10);
        checks++;
        n_inv++;
        if (v[j] != holds || (v[j] && t[j] != dut.u_coherence_tag.tag_q[j][k])) begin
          failures++;
          $display("FAIL cycle %0d: cache %0d line %0d valid %0d tag %h, tag store %h/%b",
                   cyc, j, k, v[j], t[j], dut.u_coherence_tag.tag_q[j][k], st);
        end
      end
      if (v[0] && v[1] && t[0] == t[1]) begin
        checks++;
        if (dut.u_coherence_tag.msi_q[0][k] != MSI_SHARED ||
            dut.u_coherence_tag.msi_q[1][k] != MSI_SHARED) begin
          failures++;
          $display("FAIL cycle %0d: line %0d in both caches but not shared", cyc, k);
        end
      end
    end
  endtask

  // one directed access of core p, run alone, with its expected case,
  // number of memory line transfers (-1: a hit) and final own-copy state
  task automatic directed(input int p, input bit we, input logic [31:0] a,
                          input logic [1:0] sz, input int exp_case, input int nmem,
                          input msi_t exp_state);
    int exp_lat;
    cur[p].valid = 1; cur[p].we = we; cur[p].addr = a; cur[p].size = sz;
    cur[p].data  = $urandom; cur[p].start = cyc + 1;
    last_case = ST400;
    while (cur[p].valid) run_cycle();
    exp_lat = (nmem < 0) ? 1 : 3 + nmem * (LAT + 2);
    checks++;
    if (last_lat[p] != exp_lat) begin
      failures++;
      $display("FAIL core %0d %s %h: latency %0d expected %0d", p, we ? "store" : "load", a,
               last_lat[p], exp_lat);
    end
    if (nmem >= 0) begin
      checks++;
      if (int'(last_case) != exp_case) begin
        failures++;
        $display("FAIL core %0d %s %h: case St%0d expected St%0d", p, we ? "store" : "load", a,
                 int'(last_case), exp_case);
      end
    end
    // the state in the core's own tag copy, looked up by the same address
    mp_memread[p] = 1'b1;
    mp_dataadr[p] = a;
    #1;
    checks++;
    if (out_msi[p] !== exp_state) begin
      failures++;
      $display("FAIL core %0d after %h: state %b expected %b", p, a, out_msi[p], exp_state);
    end
    mp_memread[p] = 1'b0;
    run_cycle();
  endtask

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [31:0] A = 32'h000, B = 32'h040, C = 32'h080, D = 32'h0C0, E = 32'h100;
  localparam logic [31:0] F = 32'h010, G = 32'h050;

  initial begin
    mp_memread = '0; mp_memwrite = '0; mp_dataadr = '0; mp_writedata = '0; mp_size = '0;
    for (int p = 0; p < 2; p++) begin
      cur[p].valid = 0; issued[p] = 0; fast_read[p] = 0; fast_write[p] = 0;
    end
    for (int k = 0; k < 32; k++) case_cnt[k] = 0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;

    // ---- phase 1: every protocol case, one access at a time ----
    //          core we  addr sz  case nmem state after (own copy)
    directed(0, 0, A,    2, 0,   1,   MSI_ONLY1);   // St0: tracked, nobody holds
    directed(0, 0, A+4,  2, 1,  -1,   MSI_ONLY1);   // St1: read hit
    directed(1, 0, A,    2, 6,   1,   MSI_SHARED);  // St6: clean in core 1 only
    directed(1, 0, A+8,  1, 5,  -1,   MSI_SHARED);  // St5: read hit
    directed(0, 1, A,    2, 8,   0,   MSI_MOD1);    // St8: S -> M, invalidate core 2
    directed(0, 1, A+2,  1, 8,  -1,   MSI_MOD1);    // write hit in M
    directed(1, 0, A,    2, 7,   2,   MSI_SHARED);  // St7: flush core 1, fill
    directed(1, 1, A+1,  0, 10,  0,   MSI_MOD2);    // St10: S -> M
    directed(0, 0, A,    2, 3,   2,   MSI_SHARED);  // St3: flush core 2, fill
    directed(1, 1, A+4,  2, 10,  0,   MSI_MOD2);    // St10 again
    directed(0, 1, A+12, 2, 9,   2,   MSI_MOD1);    // St9: flush core 2, fill
    directed(1, 1, A+8,  2, 11,  2,   MSI_MOD2);    // St11: flush core 1, fill
    directed(0, 0, B,    2, 12,  1,   MSI_ONLY1);   // St12: miss in both copies
    directed(1, 0, C,    2, 14,  2,   MSI_ONLY2);   // St14, victim A modified: write back
    directed(0, 0, A+8,  2, 12,  1,   MSI_ONLY1);   // St12, victim B dropped silently
    directed(1, 1, D,    2, 15,  1,   MSI_MOD2);    // St15, victim C dropped silently
    directed(0, 1, E,    2, 13,  1,   MSI_MOD1);    // St13, victim A dropped silently
    directed(1, 0, F,    2, 4,   1,   MSI_ONLY2);   // St4: reset entry, nobody holds
    directed(0, 0, F+4,  2, 2,   1,   MSI_SHARED);  // St2: clean in core 2 only
    directed(0, 1, G,    2, 13,  1,   MSI_MOD1);    // St13, shared victim F dropped
    directed(1, 0, F,    2, 5,  -1,   MSI_ONLY2);   // core 2 now holds F alone
    directed(1, 1, F,    2, 10,  0,   MSI_MOD2);    // St10 from ONLY2
    directed(0, 0, E,    2, 1,  -1,   MSI_MOD1);    // St1 from M

    // ---- phase 2: both cores at random ----
    random_mode = 1;
    while (issued[0] < RANDOM_OPS || issued[1] < RANDOM_OPS || cur[0].valid || cur[1].valid)
      run_cycle();
    random_mode = 0;

    // every line read back by both cores
    for (int t = 0; t < 4; t++)
      for (int i = 0; i < 2; i++)
        for (int w = 0; w < 4; w++)
          for (int p = 0; p < 2; p++) begin
            cur[p].valid = 1; cur[p].we = 0; cur[p].size = 2;
            cur[p].addr = {24'b0, 2'(t), 2'(i), 2'(w), 2'b00}; cur[p].start = cyc + 1;
            while (cur[p].valid) run_cycle();
          end

    // ---- every mechanism must have happened ----
    for (int k = 0; k < 16; k++) begin
      checks++;
      if (k != 1 && k != 5 && case_cnt[k] == 0) begin
        failures++;
        $display("FAIL protocol case St%0d never ran", k);
      end
    end
    check_seen("St1 read hit (core 1)", fast_read[0]);
    check_seen("St5 read hit (core 2)", fast_read[1]);
    check_seen("write hit in M (core 1)", fast_write[0]);
    check_seen("write hit in M (core 2)", fast_write[1]);
    check_seen("flush of a remote modified line", n_flush);
    check_seen("victim write-back", n_wb);
    check_seen("line fill", n_fill);
    check_seen("invalidation", n_inval);
    check_seen("S->M upgrade without fill", n_upgrade);
    check_seen("silent drop of a clean victim", n_silent);
    check_seen("both cores needing the controller", n_both_need);
    check_seen("stall cycles", n_stall_cycles);
    check_seen("byte accesses", n_byte);
    check_seen("halfword accesses", n_half);

    $display("cases:");
    for (int k = 0; k < 16; k++) $display("  St%0d: %0d", k, case_cnt[k]);
    $display("fast reads %0d/%0d, fast writes %0d/%0d, flush %0d, write-back %0d, fill %0d",
             fast_read[0], fast_read[1], fast_write[0], fast_write[1], n_flush, n_wb, n_fill);
    $display("invalidations %0d, upgrades %0d, silent drops %0d, contention %0d, cycles %0d",
             n_inval, n_upgrade, n_silent, n_both_need, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_seen(input string what, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL %s never happened", what);
    end
  endtask

endmodule
