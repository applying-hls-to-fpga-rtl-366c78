// tb_integral: self-checking test of the four trigger-relative integrals.
// The result buffer is modelled here as an array with a one-cycle read and
// filled with random signed values. For each run the bounds are random
// (linear and wraparound cases both forced, plus a one-row integral and a
// whole-window integral); every integral of every channel is compared with a
// straightforward ring-walk sum, and start-to-done must be 16387 cycles.
// The integrals output must not change held done.
module tb_integral;
  import apt_pkg::*;
  import apt_tb_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  logic              rst_n, start, busy, done, res_re;
  logic [7:0]        fine_time, start_sample;
  bounds_t           bounds [NUM_INTEGRALS];
  logic [BUF_AW-1:0] res_raddr;
  res_t              res_rdata;
  integ_t            integrals [NUM_INTEGRALS][NUM_CHANNELS];

  rows_t s;
  peds_t p;
  pkt_header_t h;
  int checks = 0, failures = 0, n_lin = 0, n_wrap = 0;

  integral dut (.*);

  // result buffer model: row value = sample - pedestal, full packet
  always @(posedge clk)
    if (res_re) res_rdata <= res_t'(row_value(h, s, p, int'(res_raddr[BUF_AW-1:CH_AW]), int'(res_raddr[CH_AW-1:0])));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int t0, lat;
    integ_t held;
    rst_n = 0; start = 0; h = '0;
    for (int k = 0; k < 4; k++) bounds[k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 10; n++) begin
      h = random_header();
      h.samples_to_be_read = 8'd255;
      for (int b = 0; b < 2; b++) for (int r = 0; r < 256; r++) for (int c = 0; c < 16; c++) begin
        p[b][r][c] = 12'(1000 + $urandom % 50);
        s[r][c]    = 12'(900 + $urandom % 1500);
      end
      fine_time = h.fine_time; start_sample = h.starting_sample_number;
      for (int k = 0; k < 4; k++) begin
        bounds[k].rel_start = 16'($signed(-20 + int'($urandom % 40)));
        bounds[k].rel_end   = 16'($signed(int'(bounds[k].rel_start) + int'($urandom % 120)));
      end
      // forced cases: one row; whole window; a wraparound pair (tail end + pre-signal start)
      bounds[0].rel_end = bounds[0].rel_start;
      if (n == 0) begin
        bounds[3].rel_start = 16'(int'(h.starting_sample_number) - int'(h.fine_time));
        bounds[3].rel_end   = 16'(int'(bounds[3].rel_start) + 255);
      end else begin
        bounds[3].rel_start = 16'sd60;
        bounds[3].rel_end   = -16'sd5;
      end
      for (int k = 0; k < 4; k++) if (is_wrap(h, bounds[k])) n_wrap++; else n_lin++;
      held = integrals[1][5];
      @(negedge clk); start = 1;
      @(posedge clk); t0 = $time;
      @(negedge clk); start = 0;
      repeat (3000) @(negedge clk);
      check(integrals[1][5] == held, "output held during computation");
      @(posedge clk iff done);
      lat = ($time - t0) / 10;
      check(lat == NUM_INTEGRALS * NUM_SAMPLES * NUM_CHANNELS + 3, $sformatf("latency %0d", lat));
      #1;
      for (int k = 0; k < 4; k++)
        for (int c = 0; c < 16; c++)
          check(int'(integrals[k][c]) == ref_integral(h, s, p, bounds[k], c),
                $sformatf("run %0d k%0d c%0d got %0d want %0d", n, k, c, integrals[k][c], ref_integral(h, s, p, bounds[k], c)));
    end
    check(n_lin > 0, "linear bounds exercised");
    check(n_wrap > 0, "wraparound bounds exercised");
    $display("linear %0d wraparound %0d", n_lin, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
