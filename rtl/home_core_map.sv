// home_core_map: finds the D$ slice that owns an address.
//
// The shared data cache is split over all cores: the top 7 bits of a 32-bit
// address name the core whose D$ slice may cache it, so each address can live
// in exactly one cache and needs no coherence protocol. Addresses from
// 0xD600_0000 up are the exception: every core may cache them locally (this
// design keeps the thread-private stack spill areas there). Purely
// combinational.
//
// The 7-bit mapping and the 0xD600_0000-0xFFFF_FFFF range follow the
// document. For meshes built with fewer cores than the 7-bit field can name,
// a field value with no core behind it is folded onto a real core by taking
// it modulo NCORES; this is this design's choice and never happens at the
// full size of 110 cores, where every such value lies in the shared range.
module home_core_map
  import em2_pkg::*;
#(
  parameter int unsigned NCORES = NCORES_DEF
) (
  input  logic [31:0]      addr,
  input  logic [CID_W-1:0] my_core,
  output logic [CID_W-1:0] home,
  output logic             replicated,
  output logic             is_local
);
  logic [CID_W-1:0] field;
  always_comb begin
    field      = addr[31:32-CID_W];
    replicated = (addr >= REPL_BASE);
    if (int'(field) < int'(NCORES)) home = field;
    else                            home = CID_W'(int'(field) % int'(NCORES));
    is_local   = replicated || (home == my_core);
  end
endmodule
