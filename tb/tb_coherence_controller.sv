// tb_coherence_controller: scenario test of the MSI coherency controller.
//
// The controller is surrounded by small models: a tag store (tag and 5-bit
// state per copy and index, answering lookups and taking the controller's
// writes), two caches that show a known line pattern, and a memory that
// acknowledges each line transfer in the third cycle of its request and
// records it. Each scenario loads the tag store with a situation, presents
// one access and checks, against values written out by hand from the MSI
// rules: the protocol case reported, the exact sequence of memory transfers
// (F = flush of the other core's line, W = victim write-back, R = fill) with
// their addresses and data, the invalidation, the fill, the final tag store
// contents and the access latency 3 + 3*transfers. Hits must not stall, and
// two simultaneous requests must be served in round-robin order.
module tb_coherence_controller;
  import msi_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic      mp_re   [NCORES];
  logic      mp_we   [NCORES];
  addr_t     mp_addr [NCORES];
  logic      stall   [NCORES];
  logic      coh_stall;
  coh_case_e coh_case;
  logic      mp_hit   [NCORES][NCORES];
  msi_t      look_msi [NCORES][NCORES];
  tag_t      look_tag [NCORES][NCORES];
  logic      tag_wr_en   [NCORES];
  addr_t     tag_wr_addr [NCORES];
  msi_t      tag_wr_msi  [NCORES];
  index_t    coh_idx;
  line_t     cache_line [NCORES];
  logic      fill_en    [NCORES];
  tag_t      fill_tag;
  logic      inval_en   [NCORES];
  logic      mem_req, mem_we, mem_ack;
  addr_t     mem_addr;
  line_t     mem_wdata;

  coherence_controller dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ---------------- models ----------------
  tag_t m_tag [NCORES][NUM_LINES];
  msi_t m_msi [NCORES][NUM_LINES];

  always_comb
    for (int p = 0; p < NCORES; p++)
      for (int j = 0; j < NCORES; j++) begin
        look_tag[p][j] = m_tag[j][mp_addr[p][5:4]];
        look_msi[p][j] = m_msi[j][mp_addr[p][5:4]];
        mp_hit[p][j]   = (mp_re[p] || mp_we[p]) && look_tag[p][j] == mp_addr[p][31:6];
      end

  function automatic line_t cache_pattern(input int j, input index_t i);
    return {32'hCAC0_0000 + 32'(j), 32'(i), 32'h1234_5678, 32'hA5A5_0000 + 32'(j)};
  endfunction

  always_comb
    for (int j = 0; j < NCORES; j++) cache_line[j] = cache_pattern(j, coh_idx);

  int mem_cnt = 0;
  assign mem_ack = mem_req && mem_cnt == 2;

  string  ops;          // transfers of the current scenario
  addr_t  op_addr [8];
  line_t  op_data [8];
  int     inval_seen [NCORES];
  int     fill_seen  [NCORES];
  coh_case_e seen_case;
  int     n_rr = 0;

  always @(posedge clk) begin
    mem_cnt <= mem_req && !mem_ack ? mem_cnt + 1 : 0;
    if (!rst) begin
      for (int j = 0; j < NCORES; j++)
        if (tag_wr_en[j]) begin
          m_tag[j][tag_wr_addr[j][5:4]] <= tag_wr_addr[j][31:6];
          m_msi[j][tag_wr_addr[j][5:4]] <= tag_wr_msi[j];
        end
    end
  end

  // event recorder (sampled in the middle of each cycle)
  always @(negedge clk) begin
    if (mem_ack && ops.len() < 8) begin
      op_addr[ops.len()] = mem_addr;
      op_data[ops.len()] = mem_wdata;
      if (!mem_we) ops = {ops, "R"};
      else if (mem_wdata == cache_pattern(int'(!dut.cur_q), coh_idx)) ops = {ops, "F"};
      else ops = {ops, "W"};
    end
    for (int j = 0; j < NCORES; j++) begin
      if (inval_en[j]) inval_seen[j]++;
      if (fill_en[j]) begin
        fill_seen[j]++;
        check(fill_tag == dut.addr_q[31:6], "fill tag");
        check(mem_ack, "fill only with the memory data");
      end
    end
    if (coh_stall && seen_case == ST400) seen_case = coh_case;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam index_t IX = 2'd1;
  function automatic addr_t la(input tag_t t);
    return {t, IX, 4'h0};
  endfunction

  // one scenario: core p accesses the line with tag 5 at index IX
  task automatic scenario(input string name, input int p, input bit we,
                          input tag_t t1, input msi_t s1, input tag_t t2, input msi_t s2,
                          input int exp_case, input string exp_ops, input tag_t exp_victim,
                          input bit exp_inval,
                          input tag_t e_t1, input msi_t e_s1, input tag_t e_t2, input msi_t e_s2);
    int lat;
    @(posedge clk);
    m_tag[0][IX] = t1; m_msi[0][IX] = s1;
    m_tag[1][IX] = t2; m_msi[1][IX] = s2;
    ops = ""; seen_case = ST400;
    for (int j = 0; j < NCORES; j++) begin inval_seen[j] = 0; fill_seen[j] = 0; end
    #1;
    mp_re[p] = !we; mp_we[p] = we; mp_addr[p] = la(26'd5) + 4;
    lat = 0;
    do begin
      @(negedge clk);
      lat++;
    end while (stall[p] && lat < 100);
    @(posedge clk);
    #1 mp_re[p] = 0; mp_we[p] = 0;
    check(int'(seen_case) == exp_case,
          $sformatf("%s: case St%0d expected St%0d", name, int'(seen_case), exp_case));
    check(ops == exp_ops, $sformatf("%s: transfers '%s' expected '%s'", name, ops, exp_ops));
    for (int k = 0; k < ops.len(); k++) begin
      if (ops[k] == "W") begin
        check(op_addr[k] == la(exp_victim), $sformatf("%s: write-back address %h", name, op_addr[k]));
        check(op_data[k] == cache_pattern(p, IX), $sformatf("%s: write-back data", name));
      end else begin
        check(op_addr[k] == la(26'd5), $sformatf("%s: %s address %h", name, ops[k], op_addr[k]));
      end
    end
    check(inval_seen[1-p] == (exp_inval ? 1 : 0) && inval_seen[p] == 0,
          $sformatf("%s: invalidations %0d/%0d", name, inval_seen[0], inval_seen[1]));
    check(fill_seen[p] == ((exp_ops.len() > 0 && exp_ops[exp_ops.len()-1] == "R") ? 1 : 0)
          && fill_seen[1-p] == 0, $sformatf("%s: fills", name));
    check(lat == 3 + 3 * exp_ops.len(), $sformatf("%s: latency %0d expected %0d", name, lat,
                                                   3 + 3 * exp_ops.len()));
    check(m_tag[0][IX] == e_t1 && m_msi[0][IX] == e_s1,
          $sformatf("%s: copy 1 = %0d/%b expected %0d/%b", name, m_tag[0][IX], m_msi[0][IX], e_t1, e_s1));
    check(m_tag[1][IX] == e_t2 && m_msi[1][IX] == e_s2,
          $sformatf("%s: copy 2 = %0d/%b expected %0d/%b", name, m_tag[1][IX], m_msi[1][IX], e_t2, e_s2));
  endtask

  // an access that must complete at once, with no transaction
  task automatic hit(input string name, input int p, input bit we,
                     input tag_t t1, input msi_t s1, input tag_t t2, input msi_t s2);
    @(posedge clk);
    m_tag[0][IX] = t1; m_msi[0][IX] = s1;
    m_tag[1][IX] = t2; m_msi[1][IX] = s2;
    #1 mp_re[p] = !we; mp_we[p] = we; mp_addr[p] = la(26'd5);
    @(negedge clk);
    check(!stall[p] && !coh_stall, $sformatf("%s: hit stalled", name));
    @(posedge clk);
    #1 mp_re[p] = 0; mp_we[p] = 0;
    @(negedge clk);
    check(!coh_stall && m_msi[0][IX] == s1 && m_msi[1][IX] == s2,
          $sformatf("%s: hit changed something", name));
  endtask

  initial begin
    for (int j = 0; j < NCORES; j++) begin
      mp_re[j] = 0; mp_we[j] = 0; mp_addr[j] = '0;
      for (int k = 0; k < NUM_LINES; k++) begin m_tag[j][k] = '0; m_msi[j][k] = MSI_NONE; end
    end
    repeat (2) @(posedge clk);
    #1 rst = 0;

    //        name    core we  copy1        copy2          case  ops   victim inval  copy1 after   copy2 after
    scenario("St0",  0, 0, 5, MSI_NONE,   6, MSI_NONE,     0,  "R",   0, 0,  5, MSI_ONLY1,  6, MSI_NONE);
    scenario("St2",  0, 0, 6, MSI_NONE,   5, MSI_ONLY2,    2,  "R",   0, 0,  5, MSI_SHARED, 5, MSI_SHARED);
    scenario("St3",  0, 0, 5, MSI_MOD2,   5, MSI_MOD2,     3,  "FR",  0, 0,  5, MSI_SHARED, 5, MSI_SHARED);
    scenario("St4",  1, 0, 5, MSI_NONE,   5, MSI_NONE,     4,  "R",   0, 0,  5, MSI_ONLY2,  5, MSI_ONLY2);
    scenario("St6",  1, 0, 5, MSI_ONLY1,  7, MSI_MOD2,     6,  "WR",  7, 0,  5, MSI_SHARED, 5, MSI_SHARED);
    scenario("St7",  1, 0, 5, MSI_MOD1,   6, MSI_ONLY2,    7,  "FR",  0, 0,  5, MSI_SHARED, 5, MSI_SHARED);
    scenario("St8",  0, 1, 5, MSI_SHARED, 5, MSI_SHARED,   8,  "",    0, 1,  5, MSI_MOD1,   5, MSI_MOD1);
    scenario("St9",  0, 1, 5, MSI_MOD2,   5, MSI_MOD2,     9,  "FR",  0, 1,  5, MSI_MOD1,   5, MSI_MOD1);
    scenario("St10", 1, 1, 5, MSI_ONLY1,  5, MSI_ONLY1,   10,  "R",   0, 1,  5, MSI_MOD2,   5, MSI_MOD2);
    scenario("St11", 1, 1, 5, MSI_MOD1,   5, MSI_MOD1,    11,  "FR",  0, 1,  5, MSI_MOD2,   5, MSI_MOD2);
    scenario("St12", 0, 0, 6, MSI_MOD1,   7, MSI_ONLY2,   12,  "WR",  6, 0,  5, MSI_ONLY1,  7, MSI_ONLY2);
    scenario("St13", 0, 1, 6, MSI_ONLY1,  7, MSI_NONE,    13,  "R",   0, 0,  5, MSI_MOD1,   7, MSI_NONE);
    scenario("St14", 1, 0, 6, MSI_NONE,   7, MSI_MOD2,    14,  "WR",  7, 0,  6, MSI_NONE,   5, MSI_ONLY2);
    scenario("St15", 1, 1, 6, MSI_SHARED, 6, MSI_SHARED,  15,  "R",   0, 0,  6, MSI_ONLY1,  5, MSI_MOD2);

    hit("St1 clean",  0, 0, 5, MSI_ONLY1,  6, MSI_NONE);
    hit("St1 shared", 0, 0, 5, MSI_SHARED, 5, MSI_SHARED);
    hit("St5 mod",    1, 0, 6, MSI_NONE,   5, MSI_MOD2);
    hit("M write 1",  0, 1, 5, MSI_MOD1,   6, MSI_ONLY2);
    hit("M write 2",  1, 1, 6, MSI_ONLY1,  5, MSI_MOD2);

    // two cores needing the controller in the same cycle: round robin
    for (int r = 0; r < 2; r++) begin
      int first;
      // before round 1 core 0 is the one served last
      if (r == 1)
        scenario("St0 again", 0, 0, 5, MSI_NONE, 6, MSI_NONE, 0, "R", 0, 0, 5, MSI_ONLY1, 6, MSI_NONE);
      @(posedge clk);
      for (int k = 0; k < NUM_LINES; k++)
        for (int j = 0; j < NCORES; j++) begin m_tag[j][k] = 26'd9; m_msi[j][k] = MSI_NONE; end
      #1;
      mp_re[0] = 1; mp_addr[0] = {26'd20, 2'd2, 4'h0};
      mp_re[1] = 1; mp_addr[1] = {26'd21, 2'd3, 4'h0};
      first = -1;
      #1;
      while (stall[0] || stall[1]) begin
        @(negedge clk);
        if (first < 0 && !stall[0]) first = 0;
        if (first < 0 && !stall[1]) first = 1;
        @(posedge clk);
        #1;
        if (first >= 0) begin
          if (!stall[0]) mp_re[0] = 0;
          if (!stall[1]) mp_re[1] = 0;
        end
        #1;
      end
      mp_re[0] = 0; mp_re[1] = 0;
      // served last before round 0: core 1 (St15); before round 1: core 0
      check(first == r, $sformatf("round robin round %0d served core %0d first", r, first));
      n_rr++;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
