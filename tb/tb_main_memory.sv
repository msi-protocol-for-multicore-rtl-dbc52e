// tb_main_memory: self-checking test of the line-wide shared main memory.
//
// Random line reads and writes go through the request/acknowledge handshake
// with a requester that holds req until ack and drops it for at least one
// cycle after. A shadow memory (starting at zero, as the memory does) predicts
// every read, and each access must be acknowledged exactly LATENCY+1 cycles
// after its first request cycle. Run with the default size and latency.
module tb_main_memory;
  import msi_pkg::*;

  localparam int unsigned MEM_LINES = 256;
  localparam int unsigned LATENCY   = 2;

  logic  clk = 1'b0;
  logic  rst = 1'b1;
  always #5 clk = ~clk;

  logic  req, we, ack;
  addr_t addr;
  line_t wdata, rdata;

  main_memory dut (.*);

  int checks = 0, failures = 0, n_rd = 0, n_wr = 0;
  line_t shadow [MEM_LINES];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < MEM_LINES; k++) shadow[k] = '0;
    req = 0; we = 0; addr = '0; wdata = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;

    for (int n = 0; n < 2000; n++) begin
      int    wait_cycles;
      int    la;
      repeat ($urandom_range(1, 3)) @(posedge clk);
      #1;
      la    = $urandom_range(0, 15) + 16 * $urandom_range(0, (MEM_LINES / 16) - 1);
      req   = 1;
      we    = ($urandom_range(0, 1) == 0);
      addr  = {20'b0, 8'(la), 4'($urandom)};
      wdata = {$urandom, $urandom, $urandom, $urandom};
      wait_cycles = 0;
      do begin
        @(negedge clk);
        wait_cycles++;
      end while (!ack && wait_cycles < 50);
      check(wait_cycles == LATENCY + 2, $sformatf("ack after %0d cycles", wait_cycles));
      if (we) begin
        shadow[la] = wdata;
        n_wr++;
      end else begin
        check(rdata == shadow[la], $sformatf("read line %0d", la));
        n_rd++;
      end
      @(posedge clk);
      #1 req = 0;
    end

    check(n_rd > 500 && n_wr > 500, "coverage of reads and writes");
    $display("reads %0d writes %0d", n_rd, n_wr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
