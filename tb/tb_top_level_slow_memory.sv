// tb_top_level_slow_memory: the dual-core system with a slower, smaller main
// memory (MEM_LATENCY = 5, MEM_LINES = 64), to show that the protocol and its
// timing do not depend on the default memory latency.
//
// Directed accesses check the transaction latency 3 + m*(MEM_LATENCY+2) for
// m = 0 (upgrade), 1 (miss), 2 (flush + fill) and 2 (write-back + fill), and
// that a read hit still takes one cycle; then
// both cores run random word accesses to lines that collide on one index,
// every load checked against a reference memory. Flushes, write-backs and
// simultaneous requests are counted and must each occur.
module tb_top_level_slow_memory;
  import msi_pkg::*;

  localparam int LAT = 5;

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

  top_level #(.MEM_LINES(64), .MEM_LATENCY(LAT)) dut (
    .clk, .rst, .mp_memread, .mp_memwrite, .mp_dataadr, .mp_writedata,
    .mp_size, .mp_readdata, .mp_stall, .coh_stall, .coh_case, .out_msi
  );

  int checks = 0, failures = 0;
  int n_flush = 0, n_wb = 0, n_both = 0;
  logic [31:0] ref_mem [int unsigned];

  bit          busy [2];
  bit          we_q [2];
  logic [31:0] a_q  [2];
  logic [31:0] d_q  [2];
  int          lat  [2];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // one cycle: drive the held or new accesses, observe mid-cycle
  task automatic cycle();
    @(posedge clk);
    #1;
    for (int p = 0; p < 2; p++) begin
      mp_memread[p]   = busy[p] && !we_q[p];
      mp_memwrite[p]  = busy[p] &&  we_q[p];
      mp_dataadr[p]   = a_q[p];
      mp_writedata[p] = d_q[p];
      mp_size[p]      = 2'd2;
      if (busy[p]) lat[p]++;
    end
    @(negedge clk);
    if (int'(dut.u_coherence_controller.state_q) == 1 && dut.mem_ack) n_flush++;
    if (int'(dut.u_coherence_controller.state_q) == 2 && dut.mem_ack) n_wb++;
    if (mp_stall == 2'b11 && !coh_stall) n_both++;
    for (int p = 0; p < 2; p++)
      if (busy[p] && !mp_stall[p] && !we_q[p])
        check(mp_readdata[p] == (ref_mem.exists(a_q[p] >> 2) ? ref_mem[a_q[p] >> 2] : 32'h0),
              $sformatf("core %0d load %h = %h", p, a_q[p], mp_readdata[p]));
    for (int p = 0; p < 2; p++)
      if (busy[p] && !mp_stall[p]) begin
        if (we_q[p]) ref_mem[a_q[p] >> 2] = d_q[p];
        busy[p] = 0;
      end
  endtask

  task automatic start(input int p, input bit we, input logic [31:0] a);
    busy[p] = 1; we_q[p] = we; a_q[p] = a; d_q[p] = $urandom; lat[p] = 0;
  endtask

  task automatic alone(input int p, input bit we, input logic [31:0] a, input int m);
    start(p, we, a);
    while (busy[p]) cycle();
    check(lat[p] == 3 + m * (LAT + 2),
          $sformatf("core %0d %h: latency %0d expected %0d", p, a, lat[p], 3 + m * (LAT + 2)));
    cycle();
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mp_memread = '0; mp_memwrite = '0; mp_dataadr = '0; mp_writedata = '0; mp_size = '0;
    busy[0] = 0; busy[1] = 0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;

    alone(0, 0, 32'h040, 1);   // miss: fill
    alone(1, 0, 32'h044, 1);   // clean in core 0 only: fill, shared
    alone(0, 1, 32'h048, 0);   // upgrade S -> M
    alone(1, 0, 32'h040, 2);   // modified by core 0: flush + fill
    alone(1, 1, 32'h040, 0);   // upgrade
    alone(1, 0, 32'h080, 2);   // victim modified by core 1: write-back + fill
    // a read hit is served in its first cycle, whatever the memory latency
    start(1, 0, 32'h084);
    while (busy[1]) cycle();
    check(lat[1] == 1, $sformatf("read hit latency %0d expected 1", lat[1]));
    cycle();

    // random traffic on index 0, four lines, word accesses
    for (int n = 0; n < 6000; n++) begin
      for (int p = 0; p < 2; p++)
        if (!busy[p] && $urandom_range(0, 2) != 0)
          start(p, $urandom_range(0, 1), {26'($urandom_range(1, 4)), 2'b00, 2'($urandom_range(0, 3)), 2'b00});
      cycle();
    end
    while (busy[0] || busy[1]) cycle();

    check(n_flush > 0 && n_wb > 0 && n_both > 0,
          $sformatf("flushes %0d, write-backs %0d, simultaneous requests %0d", n_flush, n_wb, n_both));
    $display("flushes %0d write-backs %0d simultaneous %0d", n_flush, n_wb, n_both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
