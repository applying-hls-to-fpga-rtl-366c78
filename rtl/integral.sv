// integral: four trigger-relative time integrals per channel.
//
// For each integral k the trigger-relative bounds are turned into rows of the
// pedestal-subtracted result buffer. Row 0 holds ADC slot
// starting_sample_number and the trigger arrived in slot fine_time, so
//   first = (fine_time + rel_start - starting_sample_number) mod 256
//   last  = (fine_time + rel_end   - starting_sample_number) mod 256
// If last >= first the integral is linear and sums rows first..last; otherwise
// it wraps around the end of the buffer and sums rows first..255 and 0..last.
// Following the reference kernel's final form, the loop is perfect: every
// integral visits all 256 rows x 16 channels, one per clock, and a row is
// added only when it lies inside the bounds. The sums build up in a local
// accumulator array and are copied to the integrals output in one step at the
// end, so the output only changes when a complete set is ready. The modulo-256
// row conversion is this design's reading of the bounds.
//
// Timing: start -> done = NUM_INTEGRALS*NUM_SAMPLES*NUM_CHANNELS + 3 cycles
// (16387). Read latency of the result buffer is one cycle. fine_time,
// start_sample and bounds must stay stable while busy.
module integral
  import apt_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [7:0]        fine_time,
  input  logic [7:0]        start_sample,
  input  bounds_t           bounds [NUM_INTEGRALS],
  output logic              busy,
  output logic              done,
  // result buffer read port
  output logic              res_re,
  output logic [BUF_AW-1:0] res_raddr,
  input  res_t              res_rdata,
  output integ_t            integrals [NUM_INTEGRALS][NUM_CHANNELS]
);

  localparam int unsigned K_W = $clog2(NUM_INTEGRALS);

  logic           running;
  logic [K_W-1:0] k;
  slot_t          row;
  chan_t          chan;
  slot_t          first, last_row;
  logic           linear, in_range, last;

  // stage 1: data returning from the result buffer
  logic           v1, inr1, zero1, last1;
  logic           fin;      // last accumulation written, copy out
  logic [K_W-1:0] k1;
  chan_t          chan1;

  integ_t acc [NUM_INTEGRALS][NUM_CHANNELS];

  // bounds of the integral being computed, as rows of the buffer
  assign first    = slot_t'(fine_time + bounds[k].rel_start[7:0] - start_sample);
  assign last_row = slot_t'(fine_time + bounds[k].rel_end[7:0]   - start_sample);
  assign linear   = (last_row >= first);
  assign in_range = linear ? ((row >= first) && (row <= last_row))
                           : ((row >= first) || (row <= last_row));
  assign last     = (k == K_W'(NUM_INTEGRALS - 1)) && (row == slot_t'(NUM_SAMPLES - 1)) &&
                    (chan == chan_t'(NUM_CHANNELS - 1));

  assign res_re    = running;
  assign res_raddr = {row, chan};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      running <= 1'b0;
      k       <= '0;
      row     <= '0;
      chan    <= '0;
      v1      <= 1'b0;
      inr1    <= 1'b0;
      zero1   <= 1'b0;
      last1   <= 1'b0;
      k1      <= '0;
      chan1   <= '0;
      fin     <= 1'b0;
      done    <= 1'b0;
    end else begin
      v1    <= running;
      inr1  <= in_range;
      zero1 <= (row == '0);
      last1 <= running && last;
      k1    <= k;
      chan1 <= chan;
      fin   <= v1 && last1;
      done  <= fin;
      if (start && !running) begin
        running <= 1'b1;
        k       <= '0;
        row     <= '0;
        chan    <= '0;
      end else if (running) begin
        chan <= chan + 1'b1;
        if (chan == chan_t'(NUM_CHANNELS - 1)) begin
          row <= row + 1'b1;
          if (row == slot_t'(NUM_SAMPLES - 1)) begin
            k <= k + 1'b1;
            if (last) running <= 1'b0;
          end
        end
      end
    end
  end

  // accumulate: cleared on row 0, then row values added when in range
  always_ff @(posedge clk) begin
    if (v1) begin
      acc[k1][chan1] <= (zero1 ? integ_t'(0) : acc[k1][chan1]) +
                        (inr1 ? integ_t'(res_rdata) : integ_t'(0));
    end
  end

  // copy the finished set to the output
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NUM_INTEGRALS); i++)
        for (int j = 0; j < int'(NUM_CHANNELS); j++)
          integrals[i][j] <= '0;
    end else if (fin) begin
      for (int i = 0; i < int'(NUM_INTEGRALS); i++)
        for (int j = 0; j < int'(NUM_CHANNELS); j++)
          integrals[i][j] <= acc[i][j];
    end
  end

  assign busy = running || v1 || fin;

endmodule
