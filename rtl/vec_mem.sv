// vec_mem: one memory bank of three-coordinate vectors. The design uses two
// banks: the graphic memory holding (X,Y,Z) and the auxiliary memory holding
// (U,V,W), so the rotator can read and write both in the same cycle.
//
// A single port with an address shared by reading and writing. Reading is
// asynchronous: rdata shows the word at addr while re is high (zero
// otherwise). A write takes place on the clock edge while we is high, and
// wr_ready rises one edge later to acknowledge it; the control unit waits
// for that acknowledge before moving on. The document gives the banks and
// their contents but not their depth, port or timing; those are this
// design's choices. The contents are not reset.
module vec_mem
  import cordic_pkg::*;
#(
  parameter int DEPTH = 256,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW-1:0] addr,
  input  logic          re,
  input  logic          we,
  input  vec3_t         wdata,
  output vec3_t         rdata,
  output logic          wr_ready
);
  vec3_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wr_ready <= 1'b0;
    else        wr_ready <= we;
  end

  assign rdata = re ? mem[addr] : '0;
endmodule
