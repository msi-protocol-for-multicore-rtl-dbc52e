// tb_coherence_tag: self-checking test of the duplicate tag / MSI state store.
//
// A shadow copy of both tag copies (tag and 5-bit state per index) receives
// the same random writes as the block. Each cycle both cores present random
// addresses (with or without a request) and every lookup output is compared
// with the shadow: the four hit flags, the states and tags each core sees in
// both copies, and the own-copy state. Reset must leave tag 0 and state 00000.
module tb_coherence_tag;
  import msi_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic  mp_re   [NCORES];
  logic  mp_we   [NCORES];
  addr_t mp_addr [NCORES];
  logic  wr_en   [NCORES];
  addr_t wr_addr [NCORES];
  msi_t  wr_msi  [NCORES];
  logic  mp_hit   [NCORES][NCORES];
  msi_t  look_msi [NCORES][NCORES];
  tag_t  look_tag [NCORES][NCORES];
  msi_t  out_msi  [NCORES];

  coherence_tag dut (.*);

  int checks = 0, failures = 0, n_hits = 0, n_writes = 0;
  tag_t m_tag [NCORES][NUM_LINES];
  msi_t m_msi [NCORES][NUM_LINES];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic addr_t rand_addr();
    return {26'($urandom_range(0, 3)), 2'($urandom_range(0, 3)), 4'($urandom)};
  endfunction

  function automatic msi_t rand_msi();
    msi_t legal [6];
    legal = '{MSI_NONE, MSI_ONLY1, MSI_ONLY2, MSI_SHARED, MSI_MOD1, MSI_MOD2};
    return legal[$urandom_range(0, 5)];
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < NCORES; j++) begin
      mp_re[j] = 0; mp_we[j] = 0; mp_addr[j] = '0; wr_en[j] = 0; wr_addr[j] = '0;
      wr_msi[j] = MSI_NONE;
      for (int k = 0; k < NUM_LINES; k++) begin
        m_tag[j][k] = '0; m_msi[j][k] = MSI_NONE;
      end
    end
    repeat (2) @(posedge clk);
    #1 rst = 0;

    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      for (int p = 0; p < NCORES; p++) begin
        mp_addr[p] = rand_addr();
        mp_re[p]   = ($urandom_range(0, 2) == 0);
        mp_we[p]   = !mp_re[p] && ($urandom_range(0, 2) == 0);
        wr_en[p]   = ($urandom_range(0, 3) == 0);
        wr_addr[p] = rand_addr();
        wr_msi[p]  = rand_msi();
      end
      #1;
      for (int p = 0; p < NCORES; p++) begin
        index_t i;
        i = mp_addr[p][5:4];
        for (int j = 0; j < NCORES; j++) begin
          logic h;
          h = (mp_re[p] || mp_we[p]) && m_tag[j][i] == mp_addr[p][31:6];
          if (h) n_hits++;
          check(mp_hit[p][j] == h, $sformatf("MP%0dHit%0d", p + 1, j + 1));
          check(look_msi[p][j] == m_msi[j][i], $sformatf("state of copy %0d for core %0d", j + 1, p + 1));
          check(look_tag[p][j] == m_tag[j][i], $sformatf("tag of copy %0d for core %0d", j + 1, p + 1));
        end
        check(out_msi[p] == m_msi[p][i], $sformatf("own state core %0d", p + 1));
      end
      for (int j = 0; j < NCORES; j++)
        if (wr_en[j]) begin
          n_writes++;
          m_tag[j][wr_addr[j][5:4]] = wr_addr[j][31:6];
          m_msi[j][wr_addr[j][5:4]] = wr_msi[j];
        end
    end

    check(n_hits > 200 && n_writes > 500, "coverage of hits and writes");
    $display("hits %0d writes %0d", n_hits, n_writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
