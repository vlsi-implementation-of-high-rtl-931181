// ctrl_fsm: control unit of the vector interpolator.
//
// Walks through the graphic memory one address at a time. For each vector
// it (A) starts the auxiliary coordinate generator on the (X,Y,Z) read from
// the graphic memory and waits for it, (B, C) writes the resulting (U,V,W)
// into the auxiliary memory and waits for the write acknowledge, (D) runs
// the 3-D CORDIC rotator on the (X,Y,Z) and (U,V,W) read from the two banks
// and waits for it, (E, F) writes the rotated (X,Y,Z) and (U,V,W) back and
// waits for the graphic memory's acknowledge, and (G) steps the address. After
// the last address it stops in H and raises done.
//
// States, their outputs and their transition conditions follow the state
// diagram of the document. Choices of this design: C repeats the outputs of
// B and F those of E (the diagram prints none for C and F); G returns to A
// while the address has not reached the last entry and goes to H after it
// (both arcs leaving G are printed with the same condition); the unit
// leaves H only through reset; the enable outputs are levels. As in the
// state diagram, the generator and the rotator work one after the other for
// each entry; they are independent units, so a controller that overlaps
// them (generator on entry k+1 while the rotator works on entry k) could be
// substituted.
//
// Interface: the *_ready inputs are the handshakes of the units and banks;
// addr addresses both banks. Reset (asynchronous, active low) enters A with
// address 0.
module ctrl_fsm #(
  parameter int DEPTH = 256,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          uvw_ready,        // auxiliary coordinate generator done
  input  logic          uvw_wr_ready,     // auxiliary memory write acknowledged
  input  logic          c3d_ready,        // 3-D rotator done
  input  logic          xyz_wr_ready,     // graphic memory write acknowledged
  output logic          uvw_en,
  output logic          c3d_en,
  output logic          uvw_mem_re,
  output logic          uvw_mem_we,
  output logic          xyz_mem_re,
  output logic          xyz_mem_we,
  output logic [AW-1:0] addr,
  output logic          done
);
  typedef enum logic [2:0] {A, B, C, D, E, F, G, H} state_t;
  state_t state, state_n;

  always_comb begin
    state_n = state;
    unique case (state)
      A: if (uvw_ready)    state_n = B;
      B:                   state_n = C;
      C: if (uvw_wr_ready) state_n = D;
      D: if (c3d_ready)    state_n = E;
      E:                   state_n = F;
      F: if (xyz_wr_ready) state_n = G;
      G: state_n = (int'(addr) == DEPTH - 1) ? H : A;
      H:                   state_n = H;
      default:             state_n = H;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= A;
      addr  <= '0;
    end else begin
      state <= state_n;
      if (state == G && state_n == A) addr <= addr + 1'b1;
    end
  end

  always_comb begin
    uvw_en     = (state == A) || (state == B) || (state == C);
    c3d_en     = (state == D);
    uvw_mem_re = (state == D);
    uvw_mem_we = (state == B) || (state == C) || (state == E) || (state == F);
    xyz_mem_re = (state == A) || (state == D);
    xyz_mem_we = (state == E) || (state == F);
    done       = (state == H);
  end
endmodule
