// tb_ctrl_fsm: drives the control unit with handshake partners that answer
// after random delays (so every wait loop of the state diagram is taken),
// tracks the expected state with an independent model of the diagram, and
// compares every output in every cycle. It also checks that exactly DEPTH
// vectors are processed, in address order, before done.
module tb_ctrl_fsm;
  localparam int DEPTH = 5;
  localparam int AW    = 3;

  logic          clk = 0, rst_n = 0;
  logic          uvw_ready = 0, uvw_wr_ready = 0, c3d_ready = 0, xyz_wr_ready = 0;
  logic          uvw_en, c3d_en, uvw_mem_re, uvw_mem_we, xyz_mem_re, xyz_mem_we, done;
  logic [AW-1:0] addr;
  int            checks = 0, failures = 0;
  int            waits_a = 0, waits_c = 0, waits_d = 0, waits_f = 0, vectors = 0;

  always #5 clk = ~clk;

  ctrl_fsm #(.DEPTH(DEPTH), .AW(AW)) dut (.clk, .rst_n, .uvw_ready, .uvw_wr_ready, .c3d_ready,
    .xyz_wr_ready, .uvw_en, .c3d_en, .uvw_mem_re, .uvw_mem_we, .xyz_mem_re, .xyz_mem_we,
    .addr, .done);

  // Handshake partners: ready comes a random number of cycles after the request.
  int cnt_uvw = 0, cnt_c3d = 0, cnt_uw = 0, cnt_xw = 0;
  int lim_uvw = 2, lim_c3d = 2, lim_uw = 1, lim_xw = 1;
  always_ff @(posedge clk) begin
    if (uvw_en) begin cnt_uvw <= cnt_uvw + 1; uvw_ready <= (cnt_uvw >= lim_uvw); end
    else begin cnt_uvw <= 0; uvw_ready <= 1'b0; lim_uvw <= $urandom_range(1, 6); end
    if (c3d_en) begin cnt_c3d <= cnt_c3d + 1; c3d_ready <= (cnt_c3d >= lim_c3d); end
    else begin cnt_c3d <= 0; c3d_ready <= 1'b0; lim_c3d <= $urandom_range(1, 6); end
    if (uvw_mem_we) begin cnt_uw <= cnt_uw + 1; uvw_wr_ready <= (cnt_uw >= lim_uw); end
    else begin cnt_uw <= 0; uvw_wr_ready <= 1'b0; lim_uw <= $urandom_range(0, 3); end
    if (xyz_mem_we) begin cnt_xw <= cnt_xw + 1; xyz_wr_ready <= (cnt_xw >= lim_xw); end
    else begin cnt_xw <= 0; xyz_wr_ready <= 1'b0; lim_xw <= $urandom_range(0, 3); end
  end

  // Reference model of the state diagram.
  typedef enum {MA, MB, MC, MD, ME, MF, MG, MH} mstate_t;
  mstate_t ms;
  int      maddr;

  task automatic expect_out(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL state %s: %s=%0b expected %0b", ms.name(), what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ms = MA; maddr = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    while (ms != MH || !done) begin
      @(negedge clk);
      expect_out("uvw_en",     uvw_en,     ms inside {MA, MB, MC});
      expect_out("c3d_en",     c3d_en,     ms == MD);
      expect_out("uvw_mem_re", uvw_mem_re, ms == MD);
      expect_out("uvw_mem_we", uvw_mem_we, ms inside {MB, MC, ME, MF});
      expect_out("xyz_mem_re", xyz_mem_re, ms inside {MA, MD});
      expect_out("xyz_mem_we", xyz_mem_we, ms inside {ME, MF});
      expect_out("done",       done,       ms == MH);
      checks++;
      if (int'(addr) != maddr) begin failures++; $display("FAIL addr=%0d expected %0d", addr, maddr); end
      // next state, from the inputs present before the edge
      case (ms)
        MA: if (uvw_ready)    ms = MB; else waits_a++;
        MB:                   ms = MC;
        MC: if (uvw_wr_ready) ms = MD; else waits_c++;
        MD: if (c3d_ready)    ms = ME; else waits_d++;
        ME:                   ms = MF;
        MF: if (xyz_wr_ready) ms = MG; else waits_f++;
        MG: begin
          vectors++;
          if (maddr == DEPTH - 1) ms = MH;
          else begin ms = MA; maddr++; end
        end
        default: ;
      endcase
      @(posedge clk);
      #1;
      if (failures >= 100) begin
        $display("stopping after 100 mismatches");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
    // stays in H
    repeat (5) @(posedge clk);
    checks++;
    if (!done || uvw_en || c3d_en || uvw_mem_we || xyz_mem_we) begin
      failures++; $display("FAIL H is not a quiet final state");
    end
    checks++;
    if (vectors != DEPTH) begin failures++; $display("FAIL %0d vectors processed", vectors); end
    checks++;
    if (waits_a == 0 || waits_c == 0 || waits_d == 0 || waits_f == 0) begin
      failures++; $display("FAIL a wait loop was never taken: A=%0d C=%0d D=%0d F=%0d",
                           waits_a, waits_c, waits_d, waits_f);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
