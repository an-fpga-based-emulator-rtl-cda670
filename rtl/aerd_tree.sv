// aerd_tree: tree-like cascade of 4-input AERD cells.
//
// With LEVELS levels the tree serves 4**LEVELS inputs. Level 0 cells see the
// inputs themselves, level l cells see the Valid outputs of level l-1, and
// the single cell of the last level gives the tree's Valid. Level l encodes
// address bits [2l+1:2l], so the full address is the index of the
// highest-priority (lowest-index) input that is set. Sync and the grant
// travel from the root down along the winning path only, so sync_o and en_o
// are one-hot (or zero). All address bits are zero unless en is high.
// The chip uses a 4-level tree in every double column (256 pixels,
// ADDR[7:0]) and a 3-level tree at the end of column (64 double columns,
// ADDR[13:8]); LEVELS defaults to the in-column tree.
// Purely combinational.
module aerd_tree #(
  parameter int unsigned LEVELS = 4
) (
  input  logic [4**LEVELS-1:0] state,   // input states, index 0 first
  input  logic                 en,      // grant from above (1 at the root)
  input  logic                 sync,    // Sync from above
  output logic                 valid,   // some input is set
  output logic [2*LEVELS-1:0]  addr,    // index of the winning input
  output logic [4**LEVELS-1:0] en_o,    // grant per input, one-hot or zero
  output logic [4**LEVELS-1:0] sync_o   // Sync per input, one-hot or zero
);

  localparam int unsigned N = 4**LEVELS;

  for (genvar l = 0; l < LEVELS; l++) begin : lvl
    localparam int unsigned NN = N >> (2 * (l + 1));  // cells at this level
    logic [4*NN-1:0]      in_st, in_en, in_sync;
    logic [NN-1:0]        v, g, s;
    logic [NN-1:0][1:0]   a;
    logic [1:0]           la;

    if (l == 0) begin : g_leaf
      assign in_st = state;
    end else begin : g_inner
      assign in_st = lvl[l-1].v;
    end

    if (l == LEVELS - 1) begin : g_root
      assign g = en;
      assign s = sync;
    end else begin : g_down
      assign g = lvl[l+1].in_en;
      assign s = lvl[l+1].in_sync;
    end

    for (genvar k = 0; k < NN; k++) begin : g_cell
      aerd u_aerd (
        .state  (in_st[4*k +: 4]),
        .en     (g[k]),
        .sync   (s[k]),
        .valid  (v[k]),
        .addr   (a[k]),
        .en_o   (in_en[4*k +: 4]),
        .sync_o (in_sync[4*k +: 4])
      );
    end

    // shared address bus of this level
    always_comb begin
      la = 2'd0;
      for (int k = 0; k < NN; k++) la = la | a[k];
    end
    assign addr[2*l +: 2] = la;
  end

  assign valid  = lvl[LEVELS-1].v[0];
  assign en_o   = lvl[0].in_en;
  assign sync_o = lvl[0].in_sync;

endmodule
