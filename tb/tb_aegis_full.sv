// tb_aegis_full -- the end-to-end sequence of aegis_top_test.svh with the top
// at its default sizes: 1024 oscillators, 1-out-of-8 masking, 127 response
// bits, 1024-cycle window, 64-block protected region, 12 KB firmware memory.
module tb_aegis_full;
  localparam int P_N_OSC = 1024, P_K = 8, P_NB = 127, P_W = 1024, CM_AW = 12;

  aegis_secure_top dut (.*);

  `include "aegis_top_test.svh"
endmodule
