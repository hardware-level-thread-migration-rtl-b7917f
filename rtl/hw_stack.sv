// hw_stack: register stack of a thread context with automatic spill/refill.
//
// The core keeps the top DEPTH entries of each of a thread's two stacks in
// registers. Entry 0 is the bottom of the register part, entry count-1 the
// top of stack. In one cycle an instruction may pop up to two entries and
// then push up to two (push_v0 becomes the new top, push_v1 the entry under
// it). When more than SPILL_HI entries are held, 'spill_req' asks the core to
// write the bottom entry to memory; when fewer than REFILL_LO are held and
// entries lie in memory, 'refill_req' asks for the most recently spilled one
// back. 'spilled' counts the entries in memory, so the core can form the
// spill address. For migration the whole register part is readable
// ('entries') and can be loaded in one cycle ('load_en').
//
// That the core has two stacks that spill to and refill from the data cache
// automatically follows the document. The depth, the watermarks and the
// load/unload interface are this design's choices. The module does not
// check for underflow; the core only issues operations the stack can take.
module hw_stack #(
  parameter int unsigned DEPTH     = 8,
  parameter int unsigned SPILL_HI  = 6,
  parameter int unsigned REFILL_LO = 2,
  parameter int unsigned SW        = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // instruction operation
  input  logic                     op_en,
  input  logic [1:0]               pop_n,
  input  logic [1:0]               push_n,
  input  logic [31:0]              push_v0,
  input  logic [31:0]              push_v1,
  output logic [31:0]              t0,
  output logic [31:0]              t1,
  output logic [$clog2(DEPTH+1)-1:0] count,
  // spill / refill
  output logic                     spill_req,
  output logic [31:0]              spill_data,
  input  logic                     spill_ack,
  output logic                     refill_req,
  input  logic                     refill_ack,
  input  logic [31:0]              refill_data,
  output logic [SW-1:0]            spilled,
  // whole-context access for migration
  output logic [31:0]              entries [DEPTH],
  input  logic                     load_en,
  input  logic [31:0]              load_entries [DEPTH],
  input  logic [$clog2(DEPTH+1)-1:0] load_count,
  input  logic [SW-1:0]            load_spilled
);
  localparam int unsigned CW = $clog2(DEPTH+1);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  function automatic logic [AW-1:0] at(input logic [CW-1:0] n);
    return AW'(n);
  endfunction

  logic [31:0]   e_q [DEPTH];
  logic [CW-1:0] cnt_q;
  logic [SW-1:0] sp_q;

  assign count      = cnt_q;
  assign spilled    = sp_q;
  assign t0         = (cnt_q >= CW'(1)) ? e_q[at(cnt_q - CW'(1))] : '0;
  assign t1         = (cnt_q >= CW'(2)) ? e_q[at(cnt_q - CW'(2))] : '0;
  assign spill_req  = cnt_q > CW'(SPILL_HI);
  assign spill_data = e_q[0];
  assign refill_req = cnt_q < CW'(REFILL_LO) && sp_q != '0;
  assign entries    = e_q;

  // first free slot after the pops
  logic [CW-1:0] base;
  assign base = (cnt_q >= CW'(pop_n)) ? cnt_q - CW'(pop_n) : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) e_q[i] <= '0;
      cnt_q <= '0;
      sp_q  <= '0;
    end else if (load_en) begin
      e_q   <= load_entries;
      cnt_q <= load_count;
      sp_q  <= load_spilled;
    end else if (op_en) begin
      if (push_n == 2'd1) begin
        e_q[at(base)] <= push_v0;
      end else if (push_n == 2'd2) begin
        e_q[at(base)]          <= push_v1;
        e_q[at(base + CW'(1))] <= push_v0;
      end
      cnt_q <= base + CW'(push_n);
    end else if (spill_ack) begin
      for (int i = 0; i < DEPTH - 1; i++) e_q[i] <= e_q[i+1];
      cnt_q <= cnt_q - 1'b1;
      sp_q  <= sp_q + 1'b1;
    end else if (refill_ack) begin
      for (int i = 1; i < DEPTH; i++) e_q[i] <= e_q[i-1];
      e_q[0] <= refill_data;
      cnt_q  <= cnt_q + 1'b1;
      sp_q   <= sp_q - 1'b1;
    end
  end

`ifndef SYNTHESIS
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    op_en |-> (int'(cnt_q) - int'(pop_n) + int'(push_n) <= int'(DEPTH)));
  a_one_action: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({load_en, op_en, spill_ack, refill_ack}));
`endif
endmodule
