// ped_mem: pedestal table of the preprocessing kernel.
//
// Every ADC-buffer slot of the ALPHA ASIC adds its own known offset (the
// pedestal) to the sample stored in it, separately for each channel and each
// of the two buffer banks. This memory holds all 2 x 256 x 16 12-bit pedestals,
// addressed {bank, slot, channel} in the same order as the reference software
// array all_peds[bank][slot][channel]. It is loaded once through the write
// port and read by the pedestal subtraction. Reads are registered: rd_data is
// valid the cycle after rd_en. Keeping the table on chip, rather than in
// external memory, is this design's choice.
module ped_mem
  import apt_pkg::*;
#(
  parameter int unsigned BANKS = NUM_BANKS,
  localparam int unsigned BANK_W = (BANKS > 1) ? $clog2(BANKS) : 1,
  localparam int unsigned DEPTH = BANKS * NUM_SAMPLES * NUM_CHANNELS
) (
  input  logic              clk,
  input  logic              wr_en,
  input  logic [BANK_W-1:0] wr_bank,
  input  slot_t             wr_slot,
  input  chan_t             wr_chan,
  input  adc_t              wr_data,
  input  logic              rd_en,
  input  logic [BANK_W-1:0] rd_bank,
  input  slot_t             rd_slot,
  input  chan_t             rd_chan,
  output adc_t              rd_data
);

  adc_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[{wr_bank, wr_slot, wr_chan}] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[{rd_bank, rd_slot, rd_chan}];
  end

endmodule
