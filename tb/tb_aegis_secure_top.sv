// tb_aegis_secure_top -- end-to-end test of the security subsystem at a
// reduced PUF size (32 oscillators, 1-out-of-4, 8 bits, 256-cycle window);
// the memory side runs at its default size. The sequence is in
// aegis_top_test.svh.
module tb_aegis_secure_top;
  localparam int P_N_OSC = 32, P_K = 4, P_NB = 8, P_W = 256, CM_AW = 12;

  aegis_secure_top #(.N_OSC(P_N_OSC), .K_MASK(P_K), .N_BITS(P_NB), .WINDOW(P_W)) dut (.*);

  `include "aegis_top_test.svh"
endmodule
