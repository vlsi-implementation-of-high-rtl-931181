// tb_vec_mem: writes random vectors to random addresses of a small bank,
// keeps a shadow copy, and checks read data, the read enable and the
// one-cycle write acknowledge.
module tb_vec_mem;
  import cordic_pkg::*;

  localparam int DEPTH = 16;
  localparam int AW    = 4;

  logic          clk = 0, rst_n = 0, re = 0, we = 0, wr_ready;
  logic [AW-1:0] addr = '0;
  vec3_t         wdata = '0, rdata;
  vec3_t         shadow [DEPTH];
  logic          written [DEPTH];
  int            checks = 0, failures = 0;

  always #5 clk = ~clk;

  vec_mem #(.DEPTH(DEPTH), .AW(AW)) dut (.clk, .rst_n, .addr, .re, .we, .wdata, .rdata, .wr_ready);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev_we;
    for (int k = 0; k < DEPTH; k++) written[k] = 1'b0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    prev_we = 1'b0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      // wr_ready acknowledges the write of the previous cycle
      checks++;
      if (wr_ready !== prev_we) begin
        failures++; $display("FAIL wr_ready=%0b expected %0b", wr_ready, prev_we);
      end
      addr  = AW'($urandom);
      we    = ($urandom_range(0, 2) == 0);
      re    = ($urandom_range(0, 3) != 0);
      wdata = '{a: word_t'($urandom), b: word_t'($urandom), c: word_t'($urandom)};
      #1;
      if (written[addr]) begin
        checks++;
        if (rdata !== (re ? shadow[addr] : vec3_t'('0))) begin
          failures++; $display("FAIL read addr=%0d re=%0b", addr, re);
        end
      end
      if (we) begin shadow[addr] = wdata; written[addr] = 1'b1; end
      prev_we = we;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
