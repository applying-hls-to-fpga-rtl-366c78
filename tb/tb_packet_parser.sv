// tb_packet_parser: self-checking test of the packet decoder.
// Sends packets built from random headers and samples, with random gaps in
// in_valid, some junk words before the start word, one packet with a wrong
// channel tag and one with a wrong stop word. Checks every header field, every
// sample write (address and value) against the generated rows, the number of
// writes, the error flag, and that in_ready is low while enable is low.
module tb_packet_parser;
  import apt_pkg::*;
  import apt_tb_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  logic              rst_n, enable, in_valid, in_ready;
  logic [15:0]       in_word;
  logic              smp_we;
  logic [BUF_AW-1:0] smp_waddr;
  adc_t              smp_wdata;
  pkt_header_t       hdr;
  logic              pkt_done, pkt_err;

  int checks = 0, failures = 0;
  adc_t got [NUM_SAMPLES][NUM_CHANNELS];
  int   nwrites;

  packet_parser dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (smp_we) begin
    got[smp_waddr[BUF_AW-1:CH_AW]][smp_waddr[CH_AW-1:0]] <= smp_wdata;
    nwrites <= nwrites + 1;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic send(ref logic [15:0] q[$]);
    while (q.size() > 0) begin
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      in_word  = q[0];
      @(posedge clk);
      if (in_valid && in_ready) void'(q.pop_front());
    end
    @(negedge clk); in_valid = 0;
  endtask

  initial begin
    pkt_header_t h;
    rows_t s;
    logic [15:0] q[$];
    logic bad_tag, bad_stop;
    rst_n = 0; enable = 1; in_valid = 0; in_word = 0; nwrites = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // enable low holds the parser off
    @(negedge clk); enable = 0; in_valid = 1; in_word = START_WORD;
    @(posedge clk); #1;
    check(!in_ready, "in_ready low while disabled");
    @(negedge clk); in_valid = 0; enable = 1;

    for (int p = 0; p < 12; p++) begin
      h = random_header();
      if (p == 0) h.samples_to_be_read = 8'd255;
      if (p == 1) h.samples_to_be_read = 8'd0;
      for (int r = 0; r < 256; r++) for (int c = 0; c < 16; c++) s[r][c] = 12'($urandom);
      bad_tag  = (p == 5);
      bad_stop = (p == 8);
      q.delete();
      if (p % 3 == 2) begin q.push_back(16'h1234); q.push_back(STOP_WORD); end
      build_packet(h, s, bad_tag, bad_stop, q);
      nwrites = 0;
      fork
        send(q);
        begin
          @(posedge clk iff pkt_done);
          #1;
          check(pkt_err == (bad_tag || bad_stop), $sformatf("pkt %0d error flag %0d", p, pkt_err));
          check(hdr == h, $sformatf("pkt %0d header", p));
          check(nwrites == (int'(h.samples_to_be_read) + 1) * 16, $sformatf("pkt %0d write count %0d", p, nwrites));
          for (int r = 0; r <= int'(h.samples_to_be_read); r++)
            for (int c = 0; c < 16; c++)
              check(got[r][c] == s[r][c], $sformatf("pkt %0d sample r%0d c%0d", p, r, c));
        end
      join
      repeat (2) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
