// tb_sdp_ram: self-checking test of the simple dual-port RAM.
// Random writes and reads against an array model; checks the one-cycle read
// latency, that rdata holds while re is low, and read-old-data when a read
// and a write hit the same address in one cycle.
module tb_sdp_ram;
  localparam int DEPTH = 4096, WIDTH = 16;
  logic clk = 0;
  always #5 clk = ~clk;

  logic             we, re;
  logic [11:0]      waddr, raddr;
  logic [WIDTH-1:0] wdata, rdata;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  sdp_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WIDTH-1:0] expect_q;
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0;
    // fill every location
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = 12'(a); wdata = 16'($urandom); model[a] = wdata;
    end
    @(negedge clk); we = 0; re = 1; raddr = 0; expect_q = model[0];
    // random mixed traffic
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      we = 1'($urandom); re = 1'($urandom);
      waddr = 12'($urandom); raddr = (n % 7 == 0) ? waddr : 12'($urandom);
      wdata = 16'($urandom);
      expect_q = re ? model[raddr] : expect_q;
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
      checks++;
      if (rdata !== expect_q) begin
        failures++;
        if (failures < 10) $display("mismatch at n=%0d raddr=%0d got %h want %h", n, raddr, rdata, expect_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
