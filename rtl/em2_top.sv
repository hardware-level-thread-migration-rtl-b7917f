// em2_top: the execution-migration multiprocessor, 110 tiles on a 10 x 11
// mesh.
//
// Memory is shared and has one home per address: each tile's D$ slice
// caches only the addresses whose top 7 bits name that tile. A thread that
// works on data homed elsewhere either fetches single words from the home
// slice (a network round trip per access) or, when it expects several
// accesses there, moves itself: the hardware ships its small context (PC
// and stack tops) to the home core in one trip and continues there with
// local accesses. Threads move without software at single-instruction
// granularity, decided by the instruction or by a learning predictor.
//
// The tiles are wired into six independent 2D meshes (see em2_tile). The two
// off-chip memory interfaces are not part of this RTL: each is reached
// through the east-edge memory-network ports of one tile row (MC_ROW0 and
// MC_ROW1) and brought out as a request stream (mc_req_*) and a reply
// stream (mc_rep_*) of 64-bit flits with valid/ready. All other edge ports
// of the mesh are closed.
//
// Each core's native thread is started by a pulse on start[i], beginning at
// boot_pc; halted[i] rises when it executes HALT. events[i] carries per-tile
// activity pulses.
//
// The core count, the mesh and the two off-chip memory interfaces follow the
// document; the mesh shape (10 x 11) and the placement of the memory
// interfaces on the east edge are this design's choices.
module em2_top
  import em2_pkg::*;
#(
  parameter int unsigned MESH_W   = MESH_W_DEF,
  parameter int unsigned MESH_H   = MESH_H_DEF,
  parameter int unsigned NCORES   = MESH_W * MESH_H,
  parameter int unsigned MC_ROW0  = 2,
  parameter int unsigned MC_ROW1  = 8,
  parameter int unsigned DC_BYTES = 32768,
  parameter int unsigned IC_BYTES = 8192
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start    [NCORES],
  input  logic [31:0]  boot_pc,
  output logic         halted   [NCORES],
  output tile_events_t events   [NCORES],
  // off-chip memory interfaces
  output flit_t        mc_req_flit [2],
  output logic         mc_req_valid[2],
  input  logic         mc_req_ready[2],
  input  flit_t        mc_rep_flit [2],
  input  logic         mc_rep_valid[2],
  output logic         mc_rep_ready[2]
);

  flit_t in_flit  [NCORES][NUM_NETS][4];
  logic  in_valid [NCORES][NUM_NETS][4];
  logic  in_ready [NCORES][NUM_NETS][4];
  flit_t out_flit [NCORES][NUM_NETS][4];
  logic  out_valid[NCORES][NUM_NETS][4];
  logic  out_ready[NCORES][NUM_NETS][4];

  for (genvar y = 0; y < MESH_H; y++) begin : g_y
    for (genvar x = 0; x < MESH_W; x++) begin : g_x
      localparam int T = y * MESH_W + x;
      em2_tile #(
        .NCORES(NCORES), .MESH_W(MESH_W), .MC_ROW0(MC_ROW0), .MC_ROW1(MC_ROW1),
        .DC_BYTES(DC_BYTES), .IC_BYTES(IC_BYTES)
      ) u_tile (
        .clk, .rst_n,
        .my_core(CID_W'(T)), .my_x(XY_W'(x)), .my_y(XY_W'(y)),
        .start(start[T]), .boot_pc, .halted(halted[T]),
        .n_in_flit(in_flit[T]), .n_in_valid(in_valid[T]), .n_in_ready(in_ready[T]),
        .n_out_flit(out_flit[T]), .n_out_valid(out_valid[T]),
        .n_out_ready(out_ready[T]),
        .ev(events[T])
      );

      for (genvar n = 0; n < NUM_NETS; n++) begin : g_n
        // north (dir 0) <-> neighbour's south (dir 2)
        if (y > 0) begin : g_north
          assign in_flit [T][n][0] = out_flit [T-MESH_W][n][2];
          assign in_valid[T][n][0] = out_valid[T-MESH_W][n][2];
          assign out_ready[T][n][0] = in_ready[T-MESH_W][n][2];
        end else begin : g_north_edge
          assign in_flit [T][n][0] = '0;
          assign in_valid[T][n][0] = 1'b0;
          assign out_ready[T][n][0] = 1'b1;
        end
        if (y < MESH_H - 1) begin : g_south
          assign in_flit [T][n][2] = out_flit [T+MESH_W][n][0];
          assign in_valid[T][n][2] = out_valid[T+MESH_W][n][0];
          assign out_ready[T][n][2] = in_ready[T+MESH_W][n][0];
        end else begin : g_south_edge
          assign in_flit [T][n][2] = '0;
          assign in_valid[T][n][2] = 1'b0;
          assign out_ready[T][n][2] = 1'b1;
        end
        if (x > 0) begin : g_west
          assign in_flit [T][n][3] = out_flit [T-1][n][1];
          assign in_valid[T][n][3] = out_valid[T-1][n][1];
          assign out_ready[T][n][3] = in_ready[T-1][n][1];
        end else begin : g_west_edge
          assign in_flit [T][n][3] = '0;
          assign in_valid[T][n][3] = 1'b0;
          assign out_ready[T][n][3] = 1'b1;
        end
        if (x < MESH_W - 1) begin : g_east
          assign in_flit [T][n][1] = out_flit [T+1][n][3];
          assign in_valid[T][n][1] = out_valid[T+1][n][3];
          assign out_ready[T][n][1] = in_ready[T+1][n][3];
        end else if (n == int'(NET_MREQ) && (y == MC_ROW0 || y == MC_ROW1)) begin : g_mc_req
          // requests leave the chip toward memory interface (y == MC_ROW1)
          assign mc_req_flit [y == MC_ROW1] = out_flit [T][n][1];
          assign mc_req_valid[y == MC_ROW1] = out_valid[T][n][1];
          assign out_ready[T][n][1] = mc_req_ready[y == MC_ROW1];
          assign in_flit [T][n][1] = '0;
          assign in_valid[T][n][1] = 1'b0;
        end else if (n == int'(NET_MREP) && (y == MC_ROW0 || y == MC_ROW1)) begin : g_mc_rep
          assign in_flit [T][n][1] = mc_rep_flit [y == MC_ROW1];
          assign in_valid[T][n][1] = mc_rep_valid[y == MC_ROW1];
          assign mc_rep_ready[y == MC_ROW1] = in_ready[T][n][1];
          assign out_ready[T][n][1] = 1'b1;
        end else begin : g_east_edge
          assign in_flit [T][n][1] = '0;
          assign in_valid[T][n][1] = 1'b0;
          assign out_ready[T][n][1] = 1'b1;
        end
      end
    end
  end
endmodule
