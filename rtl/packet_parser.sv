// packet_parser: decodes one ALPHA sampling-window packet from a word stream.
//
// Packet layout (16-bit words):
//   1        0xA1FA start word
//   2        [15:13] I2C address, [12:9] configuration address, [8] bank,
//            [7:0] fine time (slot at which the trigger arrived)
//   3, 4     coarse time, most significant half first
//   5        trigger number
//   6        [15:8] samples after trigger, [7:0] look-back samples
//   7        [15:8] samples to be read N, [7:0] starting sample number
//   8        [15:8] missed triggers, [7:0] state-machine status
//   9 ...    (N+1) x 16 sample words, channel 0..15 for each sample row,
//            [15:12] channel number, [11:0] ADC value
//   last     0x0E6A stop word
// The layout is that of the ALPHA readout. Reading the sample count as N+1 rows
// (so that N = 255 is a full 256-sample window) follows the reference kernel.
//
// Each ADC value is written to the sample buffer at {row, channel}; the header
// is presented on hdr. After the stop word pkt_done pulses for one cycle, with
// pkt_err set if a sample word's channel tag or the stop word was wrong.
// Words seen while waiting for a start word are dropped. in_ready is low while
// enable is low and the parser is idle, so a packet is not taken while the
// buffer it writes is still in use; once a packet has started, in_ready stays
// high until its stop word. The handshake and the error flag are this design's
// choices.
module packet_parser
  import apt_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [15:0]       in_word,
  output logic              smp_we,
  output logic [BUF_AW-1:0] smp_waddr,
  output adc_t              smp_wdata,
  output pkt_header_t       hdr,
  output logic              pkt_done,
  output logic              pkt_err
);

  typedef enum logic [3:0] {
    S_IDLE, S_W2, S_W3, S_W4, S_W5, S_W6, S_W7, S_W8, S_SMP, S_STOP
  } state_t;

  state_t      state;
  slot_t       row;        // sample row being received
  chan_t       chan;       // expected channel of the next sample word
  logic        err;
  logic        take;

  assign in_ready = (state != S_IDLE) || enable;
  assign take     = in_valid && in_ready;

  // Sample words go straight to the buffer.
  assign smp_we    = take && (state == S_SMP);
  assign smp_waddr = {row, chan};
  assign smp_wdata = in_word[ADC_W-1:0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      row      <= '0;
      chan     <= '0;
      err      <= 1'b0;
      pkt_done <= 1'b0;
      pkt_err  <= 1'b0;
      hdr      <= '0;
    end else begin
      pkt_done <= 1'b0;
      if (take) begin
        unique case (state)
          S_IDLE: if (in_word == START_WORD) begin
            state <= S_W2;
            err   <= 1'b0;
          end
          S_W2: begin
            hdr.i2c_address  <= in_word[15:13];
            hdr.conf_address <= in_word[12:9];
            hdr.bank         <= in_word[8];
            hdr.fine_time    <= in_word[7:0];
            state            <= S_W3;
          end
          S_W3: begin hdr.coarse_time[31:16] <= in_word; state <= S_W4; end
          S_W4: begin hdr.coarse_time[15:0]  <= in_word; state <= S_W5; end
          S_W5: begin hdr.trigger_number     <= in_word; state <= S_W6; end
          S_W6: begin
            hdr.samples_after_trigger <= in_word[15:8];
            hdr.look_back_samples     <= in_word[7:0];
            state                     <= S_W7;
          end
          S_W7: begin
            hdr.samples_to_be_read     <= in_word[15:8];
            hdr.starting_sample_number <= in_word[7:0];
            row                        <= '0;
            chan                       <= '0;
            state                      <= S_W8;
          end
          S_W8: begin
            hdr.missed_triggers      <= in_word[15:8];
            hdr.state_machine_status <= in_word[7:0];
            state                    <= S_SMP;
          end
          S_SMP: begin
            if (in_word[15:12] != chan) err <= 1'b1;
            chan <= chan + 1'b1;
            if (chan == chan_t'(NUM_CHANNELS - 1)) begin
              row <= row + 1'b1;
              if (row == hdr.samples_to_be_read) state <= S_STOP;
            end
          end
          S_STOP: begin
            pkt_done <= 1'b1;
            pkt_err  <= err || (in_word != STOP_WORD);
            state    <= S_IDLE;
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

endmodule
