// serial_rx_pkg: constants and helper functions shared by the oversampling
// serial receiver and by its frame tester.
//
// The receiver sees the line through a transceiver that samples it at
// 3.2 GHz and hands over 64 samples per 50 MHz clock. A frame is 5 idle
// bits (logical 0), one start bit (logical 1) and 4 data bits at 400 Mbit/s,
// so one bit lasts 8 samples. These numbers are the defaults below.
//
// Sample order everywhere: bit 0 of a word or vector is the earliest sample.
// The samples-per-bit ratio is kept in 1/16 sample units so that a ratio that
// is not a whole number can be given; bit_start() rounds the position of a
// bit boundary to the nearest sample.
package serial_rx_pkg;

  localparam int unsigned DEF_W         = 64;     // samples per clock (1:64 deserializer)
  localparam int unsigned DEF_SPB_X16   = 128;    // 8 samples per bit, times 16
  localparam int unsigned DEF_DATA_BITS = 4;
  localparam int unsigned DEF_IDLE_BITS = 5;
  localparam int unsigned DEF_START_ZEROS = 32;   // zeros required before the start bit
  localparam int unsigned DEF_BUF_WORDS = 3;
  localparam int unsigned DEF_FIFO_DEPTH = 32768; // 32 kB of 8-bit entries
  localparam int unsigned DEF_FIFO_WIDTH = 8;
  localparam int unsigned MAJ_TAPS      = 5;      // majority filter length

  // First sample of bit k of a frame, counted from the first sample of the
  // start bit (k = 0 is the start bit).
  function automatic int unsigned bit_start(int unsigned k, int unsigned spb_x16);
    return (k * spb_x16 + 8) / 16;
  endfunction

  // Samples from the start of the start bit to the end of the last data bit.
  function automatic int unsigned frame_tail(int unsigned data_bits, int unsigned spb_x16);
    return bit_start(data_bits + 1, spb_x16);
  endfunction

  // Majority of 5 samples.
  function automatic logic maj5(logic [4:0] s);
    return (32'(s[0]) + 32'(s[1]) + 32'(s[2]) + 32'(s[3]) + 32'(s[4])) >= 3;
  endfunction

endpackage
