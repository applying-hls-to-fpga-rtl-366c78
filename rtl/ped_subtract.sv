// ped_subtract: removes the pedestal offsets from every sample of a packet.
//
// The ADC sample in row i of the packet was stored in ADC-buffer slot
// (starting_sample_number + i) mod 256, and that slot adds its own offset.
// So the row index starts at 0 and the pedestal slot at the starting sample
// number, both advance together, and the slot wraps from 255 to 0:
//   result[i][j] = sample[i][j] - ped[bank][(start + i) mod 256][j]
// This is the reference algorithm.
//
// Implementation: a counter visits every (row, channel) pair once per clock,
// channels innermost, in a fixed 256 x 16 loop. Cycle t issues the reads of
// the sample buffer and of the pedestal table; cycle t+1 subtracts and writes
// the result buffer. Rows past the packet's last row (samples_to_be_read) are
// written as zero, so the result buffer never holds stale rows. Results are
// 16-bit signed (12-bit minus 12-bit). The fixed trip count and the zero rows
// are this design's choices; they give a fixed latency:
//   start -> done = NUM_SAMPLES*NUM_CHANNELS + 2 cycles (4098).
// hdr must stay stable while busy.
module ped_subtract
  import apt_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  pkt_header_t       hdr,
  output logic              busy,
  output logic              done,
  // sample buffer read port
  output logic              smp_re,
  output logic [BUF_AW-1:0] smp_raddr,
  input  adc_t              smp_rdata,
  // pedestal table read port
  output logic              ped_re,
  output logic              ped_bank,
  output slot_t             ped_slot,
  output chan_t             ped_chan,
  input  adc_t              ped_rdata,
  // result buffer write port
  output logic              res_we,
  output logic [BUF_AW-1:0] res_waddr,
  output res_t              res_wdata
);

  logic  running;
  slot_t row;
  chan_t chan;
  slot_t slot;              // pedestal slot of the current row
  logic  last;

  // one stage behind the counter: data returning from the memories
  logic              v1;
  logic              last1;
  logic              inpkt1;
  logic [BUF_AW-1:0] addr1;

  assign last = (row == slot_t'(NUM_SAMPLES - 1)) && (chan == chan_t'(NUM_CHANNELS - 1));

  assign smp_re    = running;
  assign smp_raddr = {row, chan};
  assign ped_re    = running;
  assign ped_bank  = hdr.bank;
  assign ped_slot  = slot;
  assign ped_chan  = chan;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      running <= 1'b0;
      row     <= '0;
      chan    <= '0;
      slot    <= '0;
      v1      <= 1'b0;
      last1   <= 1'b0;
      inpkt1  <= 1'b0;
      addr1   <= '0;
      done    <= 1'b0;
    end else begin
      v1     <= running;
      last1  <= running && last;
      inpkt1 <= (row <= hdr.samples_to_be_read);
      addr1  <= {row, chan};
      done   <= v1 && last1;
      if (start && !running) begin
        running <= 1'b1;
        row     <= '0;
        chan    <= '0;
        slot    <= hdr.starting_sample_number;
      end else if (running) begin
        chan <= chan + 1'b1;
        if (chan == chan_t'(NUM_CHANNELS - 1)) begin
          row  <= row + 1'b1;
          slot <= slot + 1'b1;          // wraps 255 -> 0
          if (last) running <= 1'b0;
        end
      end
    end
  end

  assign busy      = running || v1;
  assign res_we    = v1;
  assign res_waddr = addr1;
  assign res_wdata = inpkt1 ? res_t'(smp_rdata) - res_t'(ped_rdata)
                            : '0;

endmodule
