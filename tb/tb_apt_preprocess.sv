// tb_apt_preprocess: end-to-end test of the preprocessing kernel at its full
// size (256 samples x 16 channels, 2 pedestal banks, 4 integrals).
//
// Loads random pedestals into both banks, then streams a sequence of
// packets back to back, so that the kernel has to hold the input off while
// it works. Packets use both banks, starting slots that make the pedestal
// index wrap, full and short windows, junk words before a start word, and one
// packet with a wrong stop word. Bounds mix the four integral types (pre-
// signal, main, tail, whole window) with linear and wraparound cases. For
// every packet the header, error flag and all 64 integrals are compared with
// a reference sum computed here from the raw samples and pedestals, and the
// time from the stop word to out_valid must be the fixed kernel latency.
// Each of these situations is counted and must occur at least once.
module tb_apt_preprocess;
  import apt_pkg::*;
  import apt_tb_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int NPKT = 10;
  localparam int KERNEL_LATENCY = 20489;  // stop word to out_valid, in cycles

  logic        rst_n, in_valid, in_ready, busy, out_valid, out_err;
  logic [15:0] in_word;
  logic        ped_wr_en, ped_wr_bank;
  slot_t       ped_wr_slot;
  chan_t       ped_wr_chan;
  adc_t        ped_wr_data;
  bounds_t     bounds [NUM_INTEGRALS];
  pkt_header_t out_hdr;
  integ_t      integrals [NUM_INTEGRALS][NUM_CHANNELS];

  apt_preprocess dut (.*);

  peds_t       p;
  rows_t       s   [NPKT];
  pkt_header_t h   [NPKT];
  bounds_t     bnd [NPKT][NUM_INTEGRALS];
  logic        bad [NPKT];
  int          t_stop [NPKT];

  int checks = 0, failures = 0;
  int n_stall = 0, n_bank_a = 0, n_bank_b = 0, n_ped_wrap = 0, n_short = 0;
  int n_linear = 0, n_wrap = 0, n_err = 0, n_junk = 0, n_done = 0;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic finish_report();
    check(n_stall  > 0, "input stalled while busy");
    check(n_bank_a > 0, "bank A packet");
    check(n_bank_b > 0, "bank B packet");
    check(n_ped_wrap > 0, "pedestal slot wrap");
    check(n_short  > 0, "short window");
    check(n_linear > 0, "linear integral");
    check(n_wrap   > 0, "wraparound integral");
    check(n_err    > 0, "format error reported");
    check(n_junk   > 0, "junk before start word");
    $display("stall cycles %0d, bank A %0d, bank B %0d, pedestal wrap %0d, short %0d, linear %0d, wraparound %0d, errors %0d, junk %0d, packets %0d",
             n_stall, n_bank_a, n_bank_b, n_ped_wrap, n_short, n_linear, n_wrap, n_err, n_junk, n_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (NPKT * 30000 + 20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish_report();
  end

  always @(posedge clk) if (rst_n && in_valid && !in_ready) n_stall++;

  // stimulus
  initial begin
    logic [15:0] q[$];
    rst_n = 0; in_valid = 0; in_word = 0; ped_wr_en = 0; ped_wr_bank = 0;
    ped_wr_slot = 0; ped_wr_chan = 0; ped_wr_data = 0;
    for (int k = 0; k < 4; k++) bounds[k] = '0;

    // packets and bounds
    for (int n = 0; n < NPKT; n++) begin
      h[n] = random_header();
      h[n].bank = 1'(n);
      if (n < 4) h[n].samples_to_be_read = 8'd255;
      if (n == 1) h[n].starting_sample_number = 8'd0;
      if (n == 4) begin h[n].samples_to_be_read = 8'd40; h[n].starting_sample_number = 8'd240; end
      bad[n] = (n == 6);
      for (int r = 0; r < 256; r++) for (int c = 0; c < 16; c++)
        s[n][r][c] = 12'(($urandom % 8) == 0 ? 1000 + $urandom % 3000 : 950 + $urandom % 100);
      // fine time inside the window, so the trigger-relative bounds are meaningful
      h[n].fine_time = 8'(int'(h[n].starting_sample_number) + 20 + int'($urandom % 100));
      bnd[n][0].rel_start = -16'sd20; bnd[n][0].rel_end = -16'sd1;   // pre-signal noise
      bnd[n][1].rel_start =  16'sd0;  bnd[n][1].rel_end =  16'sd15;  // main signal
      bnd[n][2].rel_start =  16'sd16; bnd[n][2].rel_end =  16'sd60;  // tail
      bnd[n][3].rel_start = 16'(int'(h[n].starting_sample_number) - int'(h[n].fine_time));
      bnd[n][3].rel_end   = 16'(int'(bnd[n][3].rel_start) + int'(h[n].samples_to_be_read)); // whole window
      if (n == 2) begin bnd[n][2].rel_start = 16'sd30; bnd[n][2].rel_end = -16'sd10; end  // tail + pre-signal
    end

    repeat (3) @(negedge clk);
    rst_n = 1;

    // load pedestals
    for (int b = 0; b < 2; b++) for (int r = 0; r < 256; r++) for (int c = 0; c < 16; c++) begin
      p[b][r][c] = 12'(950 + $urandom % 100);
      @(negedge clk);
      ped_wr_en = 1; ped_wr_bank = 1'(b); ped_wr_slot = 8'(r); ped_wr_chan = 4'(c); ped_wr_data = p[b][r][c];
    end
    @(negedge clk); ped_wr_en = 0;

    for (int n = 0; n < NPKT; n++) begin
      if (h[n].bank) n_bank_b++; else n_bank_a++;
      if (int'(h[n].starting_sample_number) + int'(h[n].samples_to_be_read) > 255) n_ped_wrap++;
      if (h[n].samples_to_be_read != 8'd255) n_short++;
      for (int k = 0; k < 4; k++) if (is_wrap(h[n], bnd[n][k])) n_wrap++; else n_linear++;
      for (int k = 0; k < 4; k++) bounds[k] = bnd[n][k];
      q.delete();
      if (n == 3) begin q.push_back(16'hDEAD); q.push_back(16'h0001); n_junk++; end
      build_packet(h[n], s[n], 1'b0, bad[n], q);
      while (q.size() > 0) begin
        @(negedge clk);
        in_valid = (n % 2 == 0) ? 1'b1 : (($urandom % 3) != 0);
        in_word  = q[0];
        @(posedge clk);
        if (in_valid && in_ready) begin
          void'(q.pop_front());
          if (q.size() == 0) t_stop[n] = int'($time / 10);
        end
      end
      // bounds are taken when the stop word has been decoded
      @(negedge clk); in_valid = 0;
      @(negedge clk);
      @(negedge clk);
      in_valid = 1; in_word = 16'h0000;   // present a word at once: the kernel must refuse it
    end
  end

  // output checker
  initial begin
    int lat;
    for (int n = 0; n < NPKT; n++) begin
      @(posedge clk iff out_valid);
      lat = int'($time / 10) - t_stop[n];
      #1;
      n_done++;
      if (out_err) n_err++;
      check(lat == KERNEL_LATENCY, $sformatf("pkt %0d latency %0d", n, lat));
      check(out_hdr == h[n], $sformatf("pkt %0d header", n));
      check(out_err == bad[n], $sformatf("pkt %0d error flag", n));
      for (int k = 0; k < 4; k++)
        for (int c = 0; c < 16; c++)
          check(int'(integrals[k][c]) == ref_integral(h[n], s[n], p, bnd[n][k], c),
                $sformatf("pkt %0d k%0d c%0d got %0d want %0d", n, k, c, integrals[k][c],
                          ref_integral(h[n], s[n], p, bnd[n][k], c)));
    end
    finish_report();
  end
endmodule
