// tb_ped_subtract: self-checking test of pedestal subtraction.
// The sample buffer, pedestal table and result buffer are modelled here as
// arrays with a one-cycle registered read. Packets with random samples,
// random pedestals, both banks, starting slots that make the pedestal index
// wrap past 255, and short and full-length packets. Every one of the 4096
// results is compared with sample - pedestal (zero for rows past the packet)
// and the latency from start to done must be 4098 cycles.
module tb_ped_subtract;
  import apt_pkg::*;
  import apt_tb_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  logic              rst_n, start, busy, done;
  pkt_header_t       hdr;
  logic              smp_re, ped_re, ped_bank, res_we;
  logic [BUF_AW-1:0] smp_raddr, res_waddr;
  adc_t              smp_rdata, ped_rdata;
  slot_t             ped_slot;
  chan_t             ped_chan;
  res_t              res_wdata;

  rows_t s;
  peds_t p;
  res_t  res [NUM_SAMPLES][NUM_CHANNELS];
  int checks = 0, failures = 0, wraps = 0;

  ped_subtract dut (.*);

  // memory models
  always @(posedge clk) begin
    if (smp_re) smp_rdata <= s[smp_raddr[BUF_AW-1:CH_AW]][smp_raddr[CH_AW-1:0]];
    if (ped_re) ped_rdata <= p[ped_bank][ped_slot][ped_chan];
    if (res_we) res[res_waddr[BUF_AW-1:CH_AW]][res_waddr[CH_AW-1:0]] <= res_wdata;
  end

  initial begin
    repeat (200000) @(posedge clk);
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
    rst_n = 0; start = 0; hdr = '0;
    for (int b = 0; b < 2; b++) for (int r = 0; r < 256; r++) for (int c = 0; c < 16; c++)
      p[b][r][c] = 12'(900 + $urandom % 200);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 8; n++) begin
      hdr = random_header();
      hdr.bank = 1'(n);
      if (n == 0) begin hdr.samples_to_be_read = 8'd255; hdr.starting_sample_number = 8'd0; end
      if (n == 1) begin hdr.samples_to_be_read = 8'd255; hdr.starting_sample_number = 8'd200; end
      if (n == 2) begin hdr.samples_to_be_read = 8'd10;  hdr.starting_sample_number = 8'd250; end
      if (int'(hdr.starting_sample_number) + int'(hdr.samples_to_be_read) > 255) wraps++;
      for (int r = 0; r < 256; r++) for (int c = 0; c < 16; c++)
        s[r][c] = 12'(($urandom % 4) == 0 ? 900 + $urandom % 1000 : 900 + $urandom % 200);
      for (int r = 0; r < 256; r++) for (int c = 0; c < 16; c++) res[r][c] = 16'h5A5A;
      @(negedge clk); start = 1;
      @(posedge clk); t0 = $time;
      @(negedge clk); start = 0;
      check(busy, "busy after start");
      @(posedge clk iff done);
      lat = ($time - t0) / 10;
      check(lat == NUM_SAMPLES * NUM_CHANNELS + 2, $sformatf("latency %0d", lat));
      @(negedge clk);
      check(!busy, "idle after done");
      for (int r = 0; r < 256; r++)
        for (int c = 0; c < 16; c++)
          check(int'(res[r][c]) == row_value(hdr, s, p, r, c),
                $sformatf("pkt %0d r%0d c%0d got %0d want %0d", n, r, c, res[r][c], row_value(hdr, s, p, r, c)));
    end
    check(wraps > 0, "pedestal slot wrap exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
