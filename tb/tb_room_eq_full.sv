// tb_room_eq_full -- end-to-end test of room_eq_peripheral at its default
// parameters: 8192-point FFT window, 128 taps per channel, a full 5 s
// (240000-sample) 20 Hz - 20 kHz sweep at 48 kHz. The sequence and checks are
// those of tb_room_eq_body.svh: an overflow run with the FIFO limited to 64
// words, a complete calibration whose FFT input and all 4097 result bins are
// compared with the core model, then the real-time FIR and the bypass.
// About 5.3 s of simulated time.
`timescale 1ns/1ps
module tb_room_eq_full;
  localparam int N_TB       = 8192;
  localparam int SWEEP_TB   = 240000;
  localparam int OVF_LIMIT  = 64;
  localparam int OVF_SWEEP  = 200;
  localparam int TIMEOUT_US = 6_500_000;

  `include "tb_room_eq_body.svh"

  room_eq_peripheral dut (.*);
endmodule
