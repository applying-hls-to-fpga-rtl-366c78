// apt_tb_pkg: stimulus and reference arithmetic shared by the testbenches of
// the preprocessing kernel.
//
// build_packet turns a header and sample rows into the 16-bit word stream an
// ALPHA ASIC sends. ref_integral computes one integral of one channel the
// plain way: it converts the trigger-relative bounds into buffer rows, then
// walks the rows from first to last (going round the end of the 256-row ring
// when last < first) and adds sample minus pedestal for rows that are part
// of the packet.
package apt_tb_pkg;
  import apt_pkg::*;

  typedef logic [11:0] rows_t [NUM_SAMPLES][NUM_CHANNELS];
  typedef logic [11:0] peds_t [NUM_BANKS][NUM_SAMPLES][NUM_CHANNELS];

  function automatic void build_packet(input pkt_header_t h, const ref rows_t s,
                                       input logic bad_tag, input logic bad_stop,
                                       ref logic [15:0] q[$]);
    q.push_back(START_WORD);
    q.push_back({h.i2c_address, h.conf_address, h.bank, h.fine_time});
    q.push_back(h.coarse_time[31:16]);
    q.push_back(h.coarse_time[15:0]);
    q.push_back(h.trigger_number);
    q.push_back({h.samples_after_trigger, h.look_back_samples});
    q.push_back({h.samples_to_be_read, h.starting_sample_number});
    q.push_back({h.missed_triggers, h.state_machine_status});
    for (int r = 0; r <= int'(h.samples_to_be_read); r++)
      for (int c = 0; c < int'(NUM_CHANNELS); c++) begin
        logic [3:0] tag;
        tag = 4'(c);
        if (bad_tag && r == 1 && c == 3) tag = 4'(c + 1);
        q.push_back({tag, s[r][c]});
      end
    q.push_back(bad_stop ? 16'h0E6B : STOP_WORD);
  endfunction

  function automatic pkt_header_t random_header();
    pkt_header_t h;
    h.i2c_address            = 3'($urandom);
    h.conf_address           = 4'($urandom);
    h.bank                   = 1'($urandom);
    h.fine_time              = 8'($urandom);
    h.coarse_time            = $urandom;
    h.trigger_number         = 16'($urandom);
    h.samples_after_trigger  = 8'($urandom);
    h.look_back_samples      = 8'($urandom);
    h.samples_to_be_read     = 8'($urandom);
    h.starting_sample_number = 8'($urandom);
    h.missed_triggers        = 8'($urandom);
    h.state_machine_status   = 8'($urandom);
    return h;
  endfunction

  // value of buffer row r, channel c after pedestal subtraction
  function automatic int row_value(input pkt_header_t h, const ref rows_t s, const ref peds_t p,
                                   input int r, input int c);
    if (r > int'(h.samples_to_be_read)) return 0;
    return int'(s[r][c]) - int'(p[h.bank][(int'(h.starting_sample_number) + r) % 256][c]);
  endfunction

  // 1 if the bounds wrap round the end of the buffer
  function automatic logic is_wrap(input pkt_header_t h, input bounds_t b);
    int first, last;
    first = (int'(h.fine_time) + int'(b.rel_start) - int'(h.starting_sample_number)) & 255;
    last  = (int'(h.fine_time) + int'(b.rel_end)   - int'(h.starting_sample_number)) & 255;
    return last < first;
  endfunction

  function automatic int ref_integral(input pkt_header_t h, const ref rows_t s, const ref peds_t p,
                                      input bounds_t b, input int c);
    int first, last, r, sum;
    first = (int'(h.fine_time) + int'(b.rel_start) - int'(h.starting_sample_number)) & 255;
    last  = (int'(h.fine_time) + int'(b.rel_end)   - int'(h.starting_sample_number)) & 255;
    sum = 0;
    r = first;
    forever begin
      sum += row_value(h, s, p, r, c);
      if (r == last) break;
      r = (r + 1) & 255;
    end
    return sum;
  endfunction

endpackage
