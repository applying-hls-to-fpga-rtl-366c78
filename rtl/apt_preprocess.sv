// apt_preprocess: FPGA preprocessing kernel for one ALPHA ASIC of the APT /
// ADAPT gamma-ray telescope.
//
// Each trigger of an ALPHA ASIC yields a packet: a header and up to 256
// sample rows of 16 channels, each sample carrying the pedestal offset of the
// ADC-buffer slot it was stored in. The kernel removes those offsets and
// reduces every channel to four trigger-relative time integrals (pre-signal
// noise, main signal, tail, whole window), which go on to the localization
// software.
//
// Dataflow, one packet at a time, phases in sequence as in the reference
// kernel:
//   packet_parser  word stream -> header + sample buffer    (1 word / clock)
//   ped_subtract   sample - ped[bank][slot][chan] -> result buffer  (4098 cycles)
//   integral       4 x 256 x 16 masked sums -> integrals   (16387 cycles)
// The pedestal table is loaded through the ped_wr_* port before use. The
// integral bounds are sampled when a packet has been received and held for
// its processing. While a packet is processed the kernel takes no new words
// (in_ready low), so the sample and result buffers are never overwritten in
// use. From the stop word to out_valid is 20487 cycles; at the reference
// 300 MHz clock about 68 us.
//
// Outputs: out_valid pulses once per packet; out_hdr, out_err and integrals
// then hold until the next out_valid. integrals[k][c] is integral k of
// channel c, signed 32 bits. out_err reports a wrong channel tag or stop
// word in the packet (the packet is still processed). Plain ports instead of
// the host bus, on-chip pedestals and the error flag are this design's
// choices.
module apt_preprocess
  import apt_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // packet word stream
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [15:0] in_word,
  // pedestal load port
  input  logic        ped_wr_en,
  input  logic        ped_wr_bank,
  input  slot_t       ped_wr_slot,
  input  chan_t       ped_wr_chan,
  input  adc_t        ped_wr_data,
  // integral bounds, trigger-relative
  input  bounds_t     bounds [NUM_INTEGRALS],
  // results
  output logic        busy,
  output logic        out_valid,
  output pkt_header_t out_hdr,
  output logic        out_err,
  output integ_t      integrals [NUM_INTEGRALS][NUM_CHANNELS]
);

  typedef enum logic [1:0] {K_IDLE, K_PED, K_INT} kstate_t;
  kstate_t kstate;

  // parser -> sample buffer
  logic              smp_we;
  logic [BUF_AW-1:0] smp_waddr;
  adc_t              smp_wdata;
  pkt_header_t       p_hdr;
  logic              pkt_done, pkt_err;

  // ped_subtract ports
  logic              ps_start, ps_busy, ps_done;
  logic              smp_re;
  logic [BUF_AW-1:0] smp_raddr;
  adc_t              smp_rdata;
  logic              ped_re, ped_bank;
  slot_t             ped_slot;
  chan_t             ped_chan;
  adc_t              ped_rdata;
  logic              res_we;
  logic [BUF_AW-1:0] res_waddr;
  res_t              res_wdata;

  // integral ports
  logic              in_start, in_busy, in_done;
  logic              res_re;
  logic [BUF_AW-1:0] res_raddr;
  res_t              res_rdata;

  pkt_header_t       hdr_q;
  logic              err_q;
  bounds_t           bounds_q [NUM_INTEGRALS];

  packet_parser u_parser (
    .clk       (clk),
    .rst_n     (rst_n),
    .enable    ((kstate == K_IDLE) && !pkt_done),
    .in_valid  (in_valid),
    .in_ready  (in_ready),
    .in_word   (in_word),
    .smp_we    (smp_we),
    .smp_waddr (smp_waddr),
    .smp_wdata (smp_wdata),
    .hdr       (p_hdr),
    .pkt_done  (pkt_done),
    .pkt_err   (pkt_err)
  );

  // packet sample rows, [row][channel]
  sdp_ram #(.DEPTH(NUM_SAMPLES * NUM_CHANNELS), .WIDTH(ADC_W)) u_smp_buf (
    .clk   (clk),
    .we    (smp_we),
    .waddr (smp_waddr),
    .wdata (smp_wdata),
    .re    (smp_re),
    .raddr (smp_raddr),
    .rdata (smp_rdata)
  );

  ped_mem u_peds (
    .clk     (clk),
    .wr_en   (ped_wr_en),
    .wr_bank (ped_wr_bank),
    .wr_slot (ped_wr_slot),
    .wr_chan (ped_wr_chan),
    .wr_data (ped_wr_data),
    .rd_en   (ped_re),
    .rd_bank (ped_bank),
    .rd_slot (ped_slot),
    .rd_chan (ped_chan),
    .rd_data (ped_rdata)
  );

  ped_subtract u_ped_sub (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (ps_start),
    .hdr       (hdr_q),
    .busy      (ps_busy),
    .done      (ps_done),
    .smp_re    (smp_re),
    .smp_raddr (smp_raddr),
    .smp_rdata (smp_rdata),
    .ped_re    (ped_re),
    .ped_bank  (ped_bank),
    .ped_slot  (ped_slot),
    .ped_chan  (ped_chan),
    .ped_rdata (ped_rdata),
    .res_we    (res_we),
    .res_waddr (res_waddr),
    .res_wdata (res_wdata)
  );

  // pedestal-subtracted rows, [row][channel]
  sdp_ram #(.DEPTH(NUM_SAMPLES * NUM_CHANNELS), .WIDTH(RES_W)) u_res_buf (
    .clk   (clk),
    .we    (res_we),
    .waddr (res_waddr),
    .wdata (res_wdata),
    .re    (res_re),
    .raddr (res_raddr),
    .rdata (res_rdata)
  );

  integral u_integral (
    .clk          (clk),
    .rst_n        (rst_n),
    .start        (in_start),
    .fine_time    (hdr_q.fine_time),
    .start_sample (hdr_q.starting_sample_number),
    .bounds       (bounds_q),
    .busy         (in_busy),
    .done         (in_done),
    .res_re       (res_re),
    .res_raddr    (res_raddr),
    .res_rdata    (res_rdata),
    .integrals    (integrals)
  );

  // phase sequencing
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      kstate    <= K_IDLE;
      ps_start  <= 1'b0;
      in_start  <= 1'b0;
      hdr_q     <= '0;
      err_q     <= 1'b0;
      out_valid <= 1'b0;
      out_hdr   <= '0;
      out_err   <= 1'b0;
      for (int i = 0; i < int'(NUM_INTEGRALS); i++) bounds_q[i] <= '0;
    end else begin
      ps_start  <= 1'b0;
      in_start  <= 1'b0;
      out_valid <= 1'b0;
      unique case (kstate)
        K_IDLE: if (pkt_done) begin
          hdr_q    <= p_hdr;
          err_q    <= pkt_err;
          bounds_q <= bounds;
          ps_start <= 1'b1;
          kstate   <= K_PED;
        end
        K_PED: if (ps_done) begin
          in_start <= 1'b1;
          kstate   <= K_INT;
        end
        K_INT: if (in_done) begin
          out_valid <= 1'b1;
          out_hdr   <= hdr_q;
          out_err   <= err_q;
          kstate    <= K_IDLE;
        end
        default: kstate <= K_IDLE;
      endcase
    end
  end

  assign busy = (kstate != K_IDLE);

  // the parser must never write the sample buffer while it is being read
  a_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n) !(smp_we && ps_busy));

  // pedestal subtraction and integration never overlap
  a_one_phase: assert property (@(posedge clk) disable iff (!rst_n) !(ps_busy && in_busy));

endmodule
