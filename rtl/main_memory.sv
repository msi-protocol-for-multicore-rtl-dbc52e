// main_memory: shared main memory behind both data caches.
//
// The memory moves whole cache lines (four 32-bit words, 128 bits), since
// data only ever travels between memory and cache a line at a time. A request
// (req, with we, the byte address addr of the line and, for a write, wdata) is
// taken when the memory is idle. The memory latches it and raises ack for one
// cycle LATENCY+1 cycles after the first request cycle; a write is done and
// read data appears on rdata in that same cycle. The requester holds req
// stable until it sees ack and drops it on the next cycle.
//
// The original design places main memory off chip and gives neither its size nor its
// timing: MEM_LINES (line capacity; higher address bits alias) and LATENCY are
// this design's choices, as is the line-wide port. Contents start at zero.
module main_memory
  import msi_pkg::*;
#(
  parameter int unsigned MEM_LINES = 256,
  parameter int unsigned LATENCY   = 2
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  req,
  input  logic  we,
  input  addr_t addr,
  input  line_t wdata,
  output line_t rdata,
  output logic  ack
);

  localparam int unsigned LA_W  = $clog2(MEM_LINES);
  localparam int unsigned CNT_W = $clog2(LATENCY + 1);

  line_t            mem [MEM_LINES];
  logic             busy;
  logic [CNT_W-1:0] cnt;
  logic             we_q;
  logic [LA_W-1:0]  la_q;
  line_t            wdata_q;

  initial begin
    for (int k = 0; k < MEM_LINES; k++) mem[k] = '0;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      ack  <= 1'b0;
      cnt  <= '0;
    end else begin
      ack <= 1'b0;
      if (!busy) begin
        if (req && !ack) begin
          busy <= 1'b1;
          cnt  <= CNT_W'(LATENCY - 1);
        end
      end else if (cnt == '0) begin
        busy <= 1'b0;
        ack  <= 1'b1;
      end else begin
        cnt <= cnt - 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!busy && req && !ack) begin
      we_q    <= we;
      la_q    <= addr[OFFSET_W +: LA_W];
      wdata_q <= wdata;
    end
    if (busy && cnt == '0) begin
      if (we_q) mem[la_q] <= wdata_q;
      rdata <= mem[la_q];
    end
  end

  // the requester must hold its request until it is acknowledged
  always_ff @(posedge clk) begin
    if (!rst && busy)
      assert (req) else $error("main_memory: req dropped before ack");
  end

endmodule
