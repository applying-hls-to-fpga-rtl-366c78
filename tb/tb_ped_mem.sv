// tb_ped_mem: self-checking test of the pedestal table.
// Loads all 2 x 256 x 16 pedestals with random 12-bit values, then reads
// every (bank, slot, channel) back in random order and compares against the
// model array, checking the one-cycle read latency.
module tb_ped_mem;
  import apt_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  logic  wr_en, rd_en;
  logic  wr_bank, rd_bank;
  slot_t wr_slot, rd_slot;
  chan_t wr_chan, rd_chan;
  adc_t  wr_data, rd_data;
  adc_t  model [2][256][16];
  int checks = 0, failures = 0;

  ped_mem dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; rd_en = 0; wr_bank = 0; rd_bank = 0; wr_slot = 0; rd_slot = 0;
    wr_chan = 0; rd_chan = 0; wr_data = 0;
    for (int b = 0; b < 2; b++)
      for (int s = 0; s < 256; s++)
        for (int c = 0; c < 16; c++) begin
          @(negedge clk);
          wr_en = 1; wr_bank = 1'(b); wr_slot = 8'(s); wr_chan = 4'(c);
          wr_data = 12'($urandom); model[b][s][c] = wr_data;
        end
    @(negedge clk); wr_en = 0;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      rd_en = 1; rd_bank = 1'($urandom); rd_slot = 8'($urandom); rd_chan = 4'($urandom);
      @(posedge clk); #1;
      checks++;
      if (rd_data !== model[rd_bank][rd_slot][rd_chan]) begin
        failures++;
        if (failures < 10) $display("mismatch b=%0d s=%0d c=%0d got %0d want %0d",
                                    rd_bank, rd_slot, rd_chan, rd_data, model[rd_bank][rd_slot][rd_chan]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
