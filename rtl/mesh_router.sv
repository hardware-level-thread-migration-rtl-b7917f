// mesh_router: one node of a 2D-mesh wormhole network.
//
// Five ports (local, north, east, south, west), each with a small input FIFO.
// The header flit of a packet picks its output port by dimension-ordered
// routing (X then Y, or Y then X when YX_FIRST is set), the output is then
// held for that input until the flit marked 'last' has passed (wormhole
// switching). Free outputs are shared between competing inputs round-robin.
//
// Timing: a flit is written into the input FIFO at the clock edge it arrives
// and is offered to the next router combinationally from the FIFO head, so an
// uncongested hop costs one cycle, as the document states. Links use
// valid/ready; 'in_ready' depends only on FIFO occupancy, never on
// downstream ready, so chains of routers have no combinational loop.
//
// The document gives 64-bit flits, wormhole switching, dimension-order
// routing and single-cycle hops. The FIFO depth, the round-robin arbiter and
// the valid/ready link protocol are this design's choices.
module mesh_router
  import em2_pkg::*;
#(
  parameter int unsigned NCORES     = NCORES_DEF,
  parameter int unsigned MESH_W     = MESH_W_DEF,
  parameter int unsigned MC_ROW0    = 2,
  parameter int unsigned MC_ROW1    = 8,
  parameter bit          YX_FIRST   = 1'b0,
  parameter int unsigned FIFO_DEPTH = 2
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [XY_W-1:0] my_x,
  input  logic [XY_W-1:0] my_y,
  input  flit_t           in_flit  [5],
  input  logic            in_valid [5],
  output logic            in_ready [5],
  output flit_t           out_flit [5],
  output logic            out_valid[5],
  input  logic            out_ready[5]
);
  localparam int unsigned PW = (FIFO_DEPTH > 1) ? $clog2(FIFO_DEPTH) : 1;

  // ---------------------------------------------------------------- input FIFOs
  flit_t           fifo_q  [5][FIFO_DEPTH];
  logic [PW-1:0]   rd_q    [5];
  logic [PW-1:0]   wr_q    [5];
  logic [PW:0]     cnt_q   [5];
  logic            mid_q   [5];   // input is inside a packet
  logic [2:0]      route_q [5];   // output held by that packet

  flit_t           head    [5];
  logic            hvalid  [5];
  logic [2:0]      req_port[5];
  logic            pop     [5];

  function automatic logic [2:0] route(input logic [FLIT_W-1:0] h,
                                       input logic [XY_W-1:0] mx,
                                       input logic [XY_W-1:0] my);
    logic [XY_W-1:0] dx, dy;
    dx = node_x(hdr_dst(h), NCORES, MESH_W);
    dy = node_y(hdr_dst(h), NCORES, MESH_W, MC_ROW0, MC_ROW1);
    if (YX_FIRST) begin
      if (dy > my) return P_SOUTH;
      if (dy < my) return P_NORTH;
      if (dx > mx) return P_EAST;
      if (dx < mx) return P_WEST;
    end else begin
      if (dx > mx) return P_EAST;
      if (dx < mx) return P_WEST;
      if (dy > my) return P_SOUTH;
      if (dy < my) return P_NORTH;
    end
    return P_LOCAL;
  endfunction

  always_comb begin
    for (int i = 0; i < 5; i++) begin
      in_ready[i] = (cnt_q[i] < (PW+1)'(FIFO_DEPTH));
      head[i]     = fifo_q[i][rd_q[i]];
      hvalid[i]   = (cnt_q[i] != '0);
      req_port[i] = mid_q[i] ? route_q[i] : route(head[i].data, my_x, my_y);
    end
  end

  // ---------------------------------------------------------------- switch allocation
  logic       lock_q [5];
  logic [2:0] owner_q[5];
  logic [2:0] rr_q   [5];
  logic [2:0] grant  [5];
  logic       gvalid [5];

  always_comb begin
    for (int o = 0; o < 5; o++) begin
      gvalid[o] = 1'b0;
      grant[o]  = '0;
      if (lock_q[o]) begin
        grant[o]  = owner_q[o];
        gvalid[o] = hvalid[owner_q[o]];
      end else begin
        for (int k = 1; k <= 5; k++) begin
          if (!gvalid[o] && hvalid[(int'(rr_q[o]) + k) % 5]
              && !mid_q[(int'(rr_q[o]) + k) % 5]
              && req_port[(int'(rr_q[o]) + k) % 5] == 3'(o)) begin
            gvalid[o] = 1'b1;
            grant[o]  = 3'((int'(rr_q[o]) + k) % 5);
          end
        end
      end
      out_valid[o] = gvalid[o];
      out_flit[o]  = head[grant[o]];
    end
  end

  // out_valid never depends on out_ready; only the FIFO pops do
  always_comb begin
    for (int i = 0; i < 5; i++) pop[i] = 1'b0;
    for (int o = 0; o < 5; o++)
      if (gvalid[o] && out_ready[o]) pop[grant[o]] = 1'b1;
  end

  logic push [5];
  always_comb
    for (int i = 0; i < 5; i++) push[i] = in_valid[i] && in_ready[i];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 5; i++) begin
        rd_q[i] <= '0; wr_q[i] <= '0; cnt_q[i] <= '0;
        mid_q[i] <= 1'b0; route_q[i] <= '0;
        lock_q[i] <= 1'b0; owner_q[i] <= '0; rr_q[i] <= '0;
        for (int d = 0; d < FIFO_DEPTH; d++) fifo_q[i][d] <= '0;
      end
    end else begin
      for (int i = 0; i < 5; i++) begin
        if (push[i]) begin
          fifo_q[i][wr_q[i]] <= in_flit[i];
          wr_q[i] <= (int'(wr_q[i]) == FIFO_DEPTH-1) ? '0 : wr_q[i] + 1'b1;
        end
        if (pop[i]) begin
          rd_q[i]  <= (int'(rd_q[i]) == FIFO_DEPTH-1) ? '0 : rd_q[i] + 1'b1;
          mid_q[i] <= !head[i].last;
          if (!mid_q[i]) route_q[i] <= req_port[i];
        end
        cnt_q[i] <= cnt_q[i] + (PW+1)'(push[i]) - (PW+1)'(pop[i]);
      end
      for (int o = 0; o < 5; o++) begin
        if (gvalid[o] && out_ready[o]) begin
          lock_q[o]  <= !head[grant[o]].last;
          owner_q[o] <= grant[o];
          rr_q[o]    <= grant[o];
        end
      end
    end
  end

`ifndef SYNTHESIS
  // A wormhole output must stay with one input until its packet ends.
  for (genvar o = 0; o < 5; o++) begin : g_chk
    a_lock_hold: assert property (@(posedge clk) disable iff (!rst_n)
      lock_q[o] |-> grant[o] == owner_q[o]);
  end
`endif
endmodule
