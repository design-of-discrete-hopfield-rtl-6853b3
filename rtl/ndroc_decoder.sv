// ndroc_decoder -- address decoder built as a binary tree of NDROC cells.
//
// The tree has L = clog2(N) levels; level k holds 2**k NDROC cells that all store
// address bit L-1-k (most significant bit at the root). A read pulse enters the root
// and each cell forwards it on out (stored bit 1, right subtree) or outb (stored bit 0,
// left subtree), so it leaves the tree on exactly one of the 2**L leaf outputs: the one
// whose path spells the address. Because NDROC reads are non-destructive, one loaded
// address can be read any number of times: the controller uses that to reach the same
// element twice per update (read-and-reset, then write-back).
// Interface: load (one cycle) stores addr in the tree at the clock edge; read (one
// cycle) produces sel, one-hot, in the same cycle. Leaves at or above N are unused.
// The tree shape follows the NDROC-tree decoder of the design; cell-level timing is
// replaced by the single system clock.
module ndroc_decoder #(
  parameter int unsigned N = 8,
  localparam int unsigned L = (N > 1) ? $clog2(N) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [L-1:0] addr,
  input  logic         read,
  output logic [N-1:0] sel
);

  localparam int unsigned NODES = (1 << L) - 1;

  logic [NODES-1:0] pin;    // read pulse arriving at each node (heap order)
  logic [NODES-1:0] pout;   // out  (stored bit 1)
  logic [NODES-1:0] poutb;  // outb (stored bit 0)
  logic [NODES-1:0] st;     // stored bits, unused outside
  logic [(1<<L)-1:0] leaf;

  assign pin[0] = read;

  for (genvar k = 0; k < L; k++) begin : g_level
    for (genvar p = 0; p < (1 << k); p++) begin : g_node
      localparam int unsigned IDX = (1 << k) - 1 + p;
      ndroc u_cell (
        .clk   (clk),
        .rst_n (rst_n),
        .set   (load &  addr[L-1-k]),
        .rst   (load & ~addr[L-1-k]),
        .clk_in(pin[IDX]),
        .out   (pout[IDX]),
        .outb  (poutb[IDX]),
        .state (st[IDX])
      );
      if (k < L - 1) begin : g_fwd
        assign pin[2*IDX+1] = poutb[IDX];
        assign pin[2*IDX+2] = pout[IDX];
      end else begin : g_leaf
        assign leaf[2*p]   = poutb[IDX];
        assign leaf[2*p+1] = pout[IDX];
      end
    end
  end

  assign sel = leaf[N-1:0];

endmodule
