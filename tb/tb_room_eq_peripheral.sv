// tb_room_eq_peripheral -- end-to-end test of the whole peripheral at a
// reduced FFT length of 64 points (sweep of 100 samples); see
// tb_room_eq_body.svh for the sequence and the checks.
`timescale 1ns/1ps
module tb_room_eq_peripheral;
  localparam int N_TB       = 64;
  localparam int SWEEP_TB   = 100;
  localparam int OVF_LIMIT  = 16;
  localparam int OVF_SWEEP  = 40;
  localparam int TIMEOUT_US = 40000;

  `include "tb_room_eq_body.svh"

  room_eq_peripheral #(.N_FFT(N_TB)) dut (.*);
endmodule
