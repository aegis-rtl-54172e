// tb_code_memory -- random byte-masked writes and reads over the whole 12 KB
// firmware memory compared with a reference array; checks the one-cycle
// read latency.
module tb_code_memory;
  localparam int BYTES = 12288, WORDS = BYTES / 4;
  logic clk = 1'b0, en = 1'b0;
  logic [3:0] we = '0;
  logic [11:0] addr = '0;
  logic [31:0] wdata = '0, rdata;
  int checks = 0, failures = 0;
  logic [31:0] ref_mem [WORDS];

  code_memory #(.BYTES(BYTES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // initialise every word
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      en = 1'b1; we = 4'hf; addr = 12'(i); wdata = $urandom; ref_mem[i] = wdata;
    end
    for (int n = 0; n < 6000; n++) begin
      int a;
      a = $urandom_range(WORDS - 1);
      @(negedge clk);
      en = 1'b1; addr = 12'(a);
      if ($urandom_range(1)) begin
        we = 4'($urandom_range(1, 15)); wdata = $urandom;
        for (int b = 0; b < 4; b++) if (we[b]) ref_mem[a][8*b +: 8] = wdata[8*b +: 8];
      end else begin
        we = '0;
        @(negedge clk);
        en = 1'b0;
        checks++;
        if (rdata !== ref_mem[a]) begin failures++; $display("FAIL word %0d", a); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
