// adder_tree: pipelined binary adder tree that sums the N absolute
// differences of the PEs into one SAD_line per cycle.
//
// The tree is stored as a heap: node i adds its children 2i+1 and 2i+2, and
// children numbered N-1 and above are the inputs. Every node is a register,
// so each of the log2(N) levels is one pipeline stage: a new set of inputs is
// accepted every cycle and its sum appears log2(N) cycles later (4 for
// N = 16). A valid bit and a tag travel with the data; a level whose input is
// not valid keeps its registers unchanged (no switching for disabled
// vectors). The tree and its pipelining follow the document; one register
// per level is this design's choice. N must be a power of two.
module adder_tree
  import horb_pkg::*;
#(
  parameter int N     = MB,
  parameter int TAG_W = $bits(tag_t)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic [TAG_W-1:0]           in_tag,
  input  pix_t                       ad [N],
  output logic                       out_valid,
  output logic [TAG_W-1:0]           out_tag,
  output logic [PIX_W+$clog2(N)-1:0] sum
);

  localparam int L   = $clog2(N);
  localparam int SWD = PIX_W + L;

  logic [SWD-1:0]   node [N-1];
  logic [L:0]       v;            // v[s]: data valid after s stages
  logic [TAG_W-1:0] t [L+1];

  // depth of heap node i (root = 0)
  function automatic int depth(input int i);
    int d;
    d = 0;
    for (int x = i + 1; x > 1; x = x >> 1) d++;
    return d;
  endfunction

  function automatic logic [SWD-1:0] child(input int c);
    return (c >= N - 1) ? SWD'(ad[c-(N-1)]) : node[c];
  endfunction

  assign v[0] = in_valid;
  assign t[0] = in_tag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v[L:1] <= '0;
    else        v[L:1] <= v[L-1:0];
  end

  always_ff @(posedge clk) begin
    for (int s = 1; s <= L; s++)
      if (v[s-1]) t[s] <= t[s-1];
    for (int i = 0; i < N - 1; i++)
      if (v[L-1-depth(i)]) node[i] <= child(2*i+1) + child(2*i+2);
  end

  assign out_valid = v[L];
  assign out_tag   = t[L];
  assign sum       = node[0];

endmodule
