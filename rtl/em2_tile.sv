// em2_tile: one tile of the execution-migration multiprocessor.
//
// A tile holds the stack core with its two thread contexts and migration
// predictor (em2_core), an 8 KB instruction cache, the tile's 32 KB slice of
// the chip-wide shared data cache (dcache_slice), the logic that sends
// cache misses to off-chip memory (mem_net_if), and six mesh routers, one
// per network:
//   0 migration      core -> core, thread contexts
//   1 eviction       core -> native core, evicted guest contexts
//   2 remote request core -> home D$ slice
//   3 remote reply   home D$ slice -> core
//   4 memory request caches -> off-chip memory interface (Y-then-X routing)
//   5 memory reply   off-chip memory interface -> caches (Y-then-X routing)
// Keeping each message class on its own network means no class can block
// another, which is what makes the migration protocol deadlock free.
//
// Mesh ports: n_*[net][dir] with dir 0 = north, 1 = east, 2 = south,
// 3 = west; *_in are flits arriving from the neighbour, *_out flits leaving
// toward it, each with valid/ready.
//
// The components, the cache sizes and the six routers follow the document;
// the assignment of message classes to the six networks is this design's
// reading of "six ensure deadlock freedom".
module em2_tile
  import em2_pkg::*;
#(
  parameter int unsigned NCORES   = NCORES_DEF,
  parameter int unsigned MESH_W   = MESH_W_DEF,
  parameter int unsigned MC_ROW0  = 2,
  parameter int unsigned MC_ROW1  = 8,
  parameter int unsigned DC_BYTES = 32768,
  parameter int unsigned IC_BYTES = 8192
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [CID_W-1:0] my_core,
  input  logic [XY_W-1:0]  my_x,
  input  logic [XY_W-1:0]  my_y,
  input  logic             start,
  input  logic [31:0]      boot_pc,
  output logic             halted,
  input  flit_t            n_in_flit  [NUM_NETS][4],
  input  logic             n_in_valid [NUM_NETS][4],
  output logic             n_in_ready [NUM_NETS][4],
  output flit_t            n_out_flit [NUM_NETS][4],
  output logic             n_out_valid[NUM_NETS][4],
  input  logic             n_out_ready[NUM_NETS][4],
  output tile_events_t     ev
);
  // router local ports
  flit_t inj_flit [NUM_NETS];
  logic  inj_valid[NUM_NETS], inj_ready[NUM_NETS];
  flit_t ej_flit  [NUM_NETS];
  logic  ej_valid [NUM_NETS], ej_ready [NUM_NETS];

  for (genvar n = 0; n < NUM_NETS; n++) begin : g_net
    flit_t r_in_flit [5], r_out_flit [5];
    logic  r_in_valid[5], r_in_ready[5], r_out_valid[5], r_out_ready[5];
    always_comb begin
      r_in_flit[0]  = inj_flit[n];
      r_in_valid[0] = inj_valid[n];
      inj_ready[n]  = r_in_ready[0];
      ej_flit[n]    = r_out_flit[0];
      ej_valid[n]   = r_out_valid[0];
      r_out_ready[0] = ej_ready[n];
      for (int d = 0; d < 4; d++) begin
        r_in_flit[d+1]      = n_in_flit[n][d];
        r_in_valid[d+1]     = n_in_valid[n][d];
        n_in_ready[n][d]    = r_in_ready[d+1];
        n_out_flit[n][d]    = r_out_flit[d+1];
        n_out_valid[n][d]   = r_out_valid[d+1];
        r_out_ready[d+1]    = n_out_ready[n][d];
      end
    end
    mesh_router #(
      .NCORES(NCORES), .MESH_W(MESH_W), .MC_ROW0(MC_ROW0), .MC_ROW1(MC_ROW1),
      .YX_FIRST(n >= int'(NET_MREQ))
    ) u_router (
      .clk, .rst_n, .my_x, .my_y,
      .in_flit(r_in_flit), .in_valid(r_in_valid), .in_ready(r_in_ready),
      .out_flit(r_out_flit), .out_valid(r_out_valid), .out_ready(r_out_ready)
    );
  end

  // ---------------------------------------------------------------- caches
  logic        ic_req_valid, ic_req_ready, ic_resp_valid;
  logic [31:0] ic_addr, ic_rdata;
  logic        d_req_valid, d_req_ready, d_ctx, d_resp_valid;
  logic [3:0]  d_type;
  logic [31:0] d_addr, d_wdata, d_rdata;

  logic        m_req_valid[2], m_req_ready[2], m_req_we[2], m_fill_valid[2];
  logic [31:0] m_req_addr [2];
  logic [63:0] m_req_data [2];
  logic [63:0] m_fill_data;
  logic        ic_miss, dc_miss, dc_wb, ic_wb, served, stcnd_fail;

  dm_cache #(.SIZE_BYTES(IC_BYTES), .READ_ONLY(1'b1)) u_icache (
    .clk, .rst_n,
    .req_valid(ic_req_valid), .req_ready(ic_req_ready), .req_we(1'b0),
    .req_addr(ic_addr), .req_wdata(32'd0),
    .resp_valid(ic_resp_valid), .resp_rdata(ic_rdata),
    .mem_req_valid(m_req_valid[1]), .mem_req_ready(m_req_ready[1]),
    .mem_req_we(m_req_we[1]), .mem_req_addr(m_req_addr[1]),
    .mem_req_data(m_req_data[1]),
    .mem_fill_valid(m_fill_valid[1]), .mem_fill_data(m_fill_data),
    .miss_ev(ic_miss), .wb_ev(ic_wb)
  );

  dcache_slice #(.SIZE_BYTES(DC_BYTES)) u_dslice (
    .clk, .rst_n, .my_core,
    .c_req_valid(d_req_valid), .c_req_ready(d_req_ready), .c_type(d_type),
    .c_ctx(d_ctx), .c_addr(d_addr), .c_wdata(d_wdata),
    .c_resp_valid(d_resp_valid), .c_rdata(d_rdata),
    .rq_flit(ej_flit[NET_RREQ]), .rq_valid(ej_valid[NET_RREQ]),
    .rq_ready(ej_ready[NET_RREQ]),
    .rp_flit(inj_flit[NET_RREP]), .rp_valid(inj_valid[NET_RREP]),
    .rp_ready(inj_ready[NET_RREP]),
    .mem_req_valid(m_req_valid[0]), .mem_req_ready(m_req_ready[0]),
    .mem_req_we(m_req_we[0]), .mem_req_addr(m_req_addr[0]),
    .mem_req_data(m_req_data[0]),
    .mem_fill_valid(m_fill_valid[0]), .mem_fill_data(m_fill_data),
    .served_ev(served), .stcnd_fail_ev(stcnd_fail), .miss_ev(dc_miss), .wb_ev(dc_wb)
  );

  mem_net_if #(.NCORES(NCORES)) u_memif (
    .clk, .rst_n, .my_core,
    .c_req_valid(m_req_valid), .c_req_ready(m_req_ready), .c_req_we(m_req_we),
    .c_req_addr(m_req_addr), .c_req_data(m_req_data),
    .c_fill_valid(m_fill_valid), .c_fill_data(m_fill_data),
    .rq_flit(inj_flit[NET_MREQ]), .rq_valid(inj_valid[NET_MREQ]),
    .rq_ready(inj_ready[NET_MREQ]),
    .rp_flit(ej_flit[NET_MREP]), .rp_valid(ej_valid[NET_MREP]),
    .rp_ready(ej_ready[NET_MREP])
  );

  // Nothing is addressed to a core on the memory-request network and cores
  // inject nothing on the memory-reply network.
  assign ej_ready[NET_MREQ]  = 1'b1;
  assign inj_valid[NET_MREP] = 1'b0;
  assign inj_flit[NET_MREP]  = '0;

  // ---------------------------------------------------------------- core
  tile_events_t core_ev;
  em2_core #(.NCORES(NCORES)) u_core (
    .clk, .rst_n, .my_core, .start, .boot_pc, .halted,
    .i_req_valid(ic_req_valid), .i_req_ready(ic_req_ready), .i_addr(ic_addr),
    .i_resp_valid(ic_resp_valid), .i_rdata(ic_rdata),
    .d_req_valid, .d_req_ready, .d_type, .d_ctx, .d_addr, .d_wdata,
    .d_resp_valid, .d_rdata,
    .mig_out_flit(inj_flit[NET_MIG]), .mig_out_valid(inj_valid[NET_MIG]),
    .mig_out_ready(inj_ready[NET_MIG]),
    .ev_out_flit(inj_flit[NET_EVICT]), .ev_out_valid(inj_valid[NET_EVICT]),
    .ev_out_ready(inj_ready[NET_EVICT]),
    .mig_in_flit(ej_flit[NET_MIG]), .mig_in_valid(ej_valid[NET_MIG]),
    .mig_in_ready(ej_ready[NET_MIG]),
    .ev_in_flit(ej_flit[NET_EVICT]), .ev_in_valid(ej_valid[NET_EVICT]),
    .ev_in_ready(ej_ready[NET_EVICT]),
    .rq_out_flit(inj_flit[NET_RREQ]), .rq_out_valid(inj_valid[NET_RREQ]),
    .rq_out_ready(inj_ready[NET_RREQ]),
    .rp_in_flit(ej_flit[NET_RREP]), .rp_in_valid(ej_valid[NET_RREP]),
    .rp_in_ready(ej_ready[NET_RREP]),
    .ev(core_ev)
  );

  always_comb begin
    ev               = core_ev;
    ev.remote_served = served;
    ev.cache_miss    = ic_miss || dc_miss;
    ev.writeback     = dc_wb || ic_wb;
    ev.stcnd_fail    = stcnd_fail;
  end
endmodule
