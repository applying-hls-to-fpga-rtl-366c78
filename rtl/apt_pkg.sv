// apt_pkg: shared sizes and types of the APT/ADAPT event-preprocessing kernel.
//
// One ALPHA ASIC sampling window is 256 samples (10 ns apart) of 16 channels,
// each a 12-bit ADC value. The ASIC sends it as a packet of 16-bit words: a
// start word, seven header words, one word per sample and channel, and a stop
// word. The kernel subtracts a per-slot pedestal from every sample and forms
// four trigger-relative time integrals per channel. The sizes, the start/stop
// words and the header fields follow the packet definition of the ALPHA
// readout; the 16-bit signed result width and the 32-bit integral width follow
// the reference software model. The bounds type (16-bit signed offsets from
// the trigger sample) is this design's choice.
package apt_pkg;

  localparam int unsigned NUM_SAMPLES   = 256;  // ADC buffer slots per bank
  localparam int unsigned NUM_CHANNELS  = 16;   // channels per ASIC
  localparam int unsigned NUM_INTEGRALS = 4;    // pre-signal, main, tail, whole window
  localparam int unsigned NUM_BANKS     = 2;    // ADC buffer banks A and B
  localparam int unsigned ADC_W         = 12;   // ADC value and pedestal width
  localparam int unsigned RES_W         = 16;   // pedestal-subtracted sample width
  localparam int unsigned INT_W         = 32;   // integral width
  localparam int unsigned SMP_AW        = $clog2(NUM_SAMPLES);
  localparam int unsigned CH_AW         = $clog2(NUM_CHANNELS);
  localparam int unsigned BUF_AW        = SMP_AW + CH_AW;   // {sample, channel}

  localparam logic [15:0] START_WORD = 16'hA1FA;  // "ALphA"
  localparam logic [15:0] STOP_WORD  = 16'h0E6A;  // "OmEGA"

  typedef logic [SMP_AW-1:0] slot_t;
  typedef logic [CH_AW-1:0]  chan_t;
  typedef logic [ADC_W-1:0]  adc_t;
  typedef logic signed [RES_W-1:0] res_t;
  typedef logic signed [INT_W-1:0] integ_t;

  // Decoded header words 2..8 of a packet.
  typedef struct packed {
    logic [2:0]  i2c_address;
    logic [3:0]  conf_address;
    logic        bank;                   // 0 = bank A, 1 = bank B
    logic [7:0]  fine_time;              // slot at which the trigger arrived
    logic [31:0] coarse_time;
    logic [15:0] trigger_number;
    logic [7:0]  samples_after_trigger;
    logic [7:0]  look_back_samples;
    logic [7:0]  samples_to_be_read;     // rows in the packet minus one
    logic [7:0]  starting_sample_number; // slot of the first sample row
    logic [7:0]  missed_triggers;
    logic [7:0]  state_machine_status;
  } pkt_header_t;

  // Trigger-relative bounds of one integral, inclusive at both ends.
  typedef struct packed {
    logic signed [15:0] rel_start;
    logic signed [15:0] rel_end;
  } bounds_t;

endpackage
