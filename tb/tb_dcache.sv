// tb_dcache: self-checking test of the direct-mapped data cache.
//
// A shadow model of the 4 lines (valid, tag, 128-bit data) is updated with
// the same fills, invalidations and stores the cache receives. Each cycle a
// random mix of controller fills/invalidations and core loads/stores of every
// size (some of them stalled) is applied, and the hit flag, the load data and
// the controller's view of a line are compared with the model. Loads and hits
// are combinational, so they are checked in the cycle they are presented.
module tb_dcache;
  import msi_pkg::*;

  logic   clk = 1'b0;
  logic   rst = 1'b1;
  always #5 clk = ~clk;

  logic   cpu_re, cpu_we, cpu_stall, cpu_hit;
  addr_t  cpu_addr;
  word_t  cpu_wdata, cpu_rdata;
  size_e  cpu_size;
  index_t coh_idx;
  line_t  coh_line, fill_line;
  logic   coh_valid, fill_en, inval_en;
  tag_t   coh_tag, fill_tag;

  dcache dut (.*);

  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_store = 0, n_byte = 0, n_half = 0;

  logic  m_valid [NUM_LINES];
  tag_t  m_tag   [NUM_LINES];
  line_t m_data  [NUM_LINES];

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
    tag_t tags [3];
    tags[0] = 26'h0000000; tags[1] = 26'h0000001; tags[2] = 26'h2AAAAAA;
    cpu_re = 0; cpu_we = 0; cpu_stall = 0; cpu_addr = '0; cpu_wdata = '0; cpu_size = SIZE_WORD;
    coh_idx = '0; fill_line = '0; fill_en = 0; inval_en = 0; fill_tag = '0;
    for (int k = 0; k < NUM_LINES; k++) m_valid[k] = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;

    // after reset nothing hits
    for (int k = 0; k < NUM_LINES; k++) begin
      cpu_re = 1; cpu_addr = {tags[0], 2'(k), 4'h0}; #1;
      check(!cpu_hit, "hit after reset");
    end
    cpu_re = 0;

    for (int n = 0; n < 3000; n++) begin
      logic   hit_exp;
      word_t  w, exp;
      index_t i;
      logic [1:0] ws, bs;
      int op;
      @(negedge clk);
      // controller side
      fill_en = 0; inval_en = 0;
      coh_idx = 2'($urandom_range(0, 3));
      op = $urandom_range(0, 9);
      if (op == 0) begin
        fill_en   = 1;
        fill_tag  = tags[$urandom_range(0, 2)];
        fill_line = {$urandom, $urandom, $urandom, $urandom};
      end else if (op == 1) begin
        inval_en = 1;
      end
      // core side
      cpu_size  = size_e'($urandom_range(0, 2));
      i  = 2'($urandom_range(0, 3));
      ws = 2'($urandom_range(0, 3));
      bs = (cpu_size == SIZE_BYTE) ? 2'($urandom_range(0, 3)) :
           (cpu_size == SIZE_HALF) ? {1'($urandom_range(0, 1)), 1'b0} : 2'b00;
      cpu_addr  = {tags[$urandom_range(0, 2)], i, ws, bs};
      cpu_we    = ($urandom_range(0, 2) == 0);
      cpu_re    = !cpu_we && ($urandom_range(0, 4) != 0);
      cpu_stall = ($urandom_range(0, 3) == 0);
      cpu_wdata = $urandom;
      if (fill_en && coh_idx == i) cpu_stall = 1;  // the controller never mixes them
      if (inval_en && coh_idx == i) cpu_stall = 1;
      #1;
      // checks of the combinational outputs
      check(coh_valid == m_valid[coh_idx], "coh_valid");
      if (m_valid[coh_idx]) begin
        check(coh_tag == m_tag[coh_idx], "coh_tag");
        check(coh_line == m_data[coh_idx], "coh_line");
      end
      hit_exp = (cpu_re || cpu_we) && m_valid[i] && m_tag[i] == cpu_addr[31:6];
      check(cpu_hit == hit_exp, $sformatf("hit addr %h", cpu_addr));
      if (hit_exp) n_hit++; else if (cpu_re || cpu_we) n_miss++;
      if (cpu_re && hit_exp) begin
        w = m_data[i][32*ws +: 32] >> (8 * bs);
        exp = (cpu_size == SIZE_BYTE) ? {24'b0, w[7:0]} :
              (cpu_size == SIZE_HALF) ? {16'b0, w[15:0]} : w;
        check(cpu_rdata == exp, $sformatf("load %h size %0d got %h exp %h",
                                          cpu_addr, cpu_size, cpu_rdata, exp));
        if (cpu_size == SIZE_BYTE) n_byte++;
        if (cpu_size == SIZE_HALF) n_half++;
      end
      // model update at the coming edge
      if (fill_en) begin
        m_valid[coh_idx] = 1; m_tag[coh_idx] = fill_tag; m_data[coh_idx] = fill_line;
      end else if (inval_en) begin
        m_valid[coh_idx] = 0;
      end
      if (cpu_we && hit_exp && !cpu_stall) begin
        n_store++;
        case (cpu_size)
          SIZE_BYTE: m_data[i][32*ws + 8*bs +: 8]  = cpu_wdata[7:0];
          SIZE_HALF: m_data[i][32*ws + 8*bs +: 16] = cpu_wdata[15:0];
          default:   m_data[i][32*ws +: 32]        = cpu_wdata;
        endcase
      end
    end

    check(n_hit > 100 && n_miss > 100 && n_store > 50 && n_byte > 10 && n_half > 10,
          "coverage of hits, misses, stores, byte and halfword loads");
    $display("hits %0d misses %0d stores %0d byte loads %0d half loads %0d",
             n_hit, n_miss, n_store, n_byte, n_half);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
