// efpga_top -- island-style embedded FPGA built from cFA logic blocks.
//
// A W x H array of CLBs (four cFA slices each) sits in a mesh of unidirectional routing
// channels of CW wires. A switch block at every channel crossing drives the wires that start
// there (wires span SEG_LEN segments), a connection block in front of every CLB lets each of
// its 24 inputs pick a track of an adjacent channel, and one IO site next to every perimeter
// channel segment brings a signal in and out (NUM_IO = 2W + 2H sites). All configuration
// lives in one configuration memory that is loaded serially (cfg_en, cfg_in) after power-up;
// the layout of that bitstream is documented in efpga_pkg. por_n (power-on reset) clears the
// configuration; while it is low or a load is running, all routing is switched off.
//
// IO numbering: sites 0..W-1 bottom edge (chanx(x,0), x = 1..W), W..2W-1 top edge
// (chanx(x,H)), 2W..2W+H-1 left edge (chany(0,y), y = 1..H), 2W+H..2W+2H-1 right edge
// (chany(W,y)). The input pad of a site enters the fabric at the switch block at the end of
// its segment farther from the origin: SB(x,0), SB(x,H), SB(0,y), SB(W,y).
// CLB (i,j) feeds its eight outputs to SB(i,j); the switch blocks of row 0 and column 0 take
// the outputs of the nearest CLB.
//
// Timing: the user circuit is clocked by clk; the slice flip-flops are cleared by a
// synchronous active-low rst_n. Paths through the routing are combinational.
// The thesis fixes the CLB (4 slices, 24 inputs), the Wilton switch blocks with Fs = 3,
// unidirectional segmented wires and the per-pin connection multiplexers. It leaves the
// array size, channel width and segment length to the place-and-route tool per design; the
// defaults here (8 x 8, 16, 4) are this design's choices.
//
// Routing forms cycles in the netlist by nature, so lint tools report combinational loops
// through the switch blocks; an unprogrammed fabric (all selects 0) drives every wire to 0.
module efpga_top
  import efpga_pkg::*;
#(
  parameter int W       = 8,
  parameter int H       = 8,
  parameter int CW      = 16,
  parameter int SEG_LEN = 4,
  parameter int NUM_IO  = num_io(W, H),
  parameter int CFG_BITS = total_cfg_bits(W, H, CW, SEG_LEN)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              por_n,
  input  logic              cfg_en,
  input  logic              cfg_in,
  output logic              cfg_out,
  input  logic [NUM_IO-1:0] io_in,
  output logic [NUM_IO-1:0] io_out
);
  localparam int HW  = CW / 2;
  localparam int CBB = cb_cfg_bits(CW);
  localparam int IOB = io_cfg_bits(CW);

  logic [CFG_BITS-1:0] cfg;

  // Channel segment wires; entries outside the valid ranges are unused.
  logic [CW-1:0] chanx [W+1][H+1];
  logic [CW-1:0] chany [W+1][H+1];
  logic [CLB_OUTPUTS-1:0] clb_out [W+1][H+1];
  logic [NUM_IO-1:0] fabric_in;

  config_memory #(.BITS(CFG_BITS)) u_cfg (
    .clk    (clk),
    .por_n  (por_n),
    .cfg_en (cfg_en),
    .cfg_in (cfg_in),
    .cfg_out(cfg_out),
    .cfg    (cfg)
  );

  // ---------------------------------------------------------------- CLBs and CBs
  for (genvar i = 1; i <= W; i++) begin : g_x
    for (genvar j = 1; j <= H; j++) begin : g_y
      logic [CLB_INPUTS-1:0] pins;
      logic [3:0][CW-1:0]    chan;

      assign chan[0] = chanx[i][j];
      assign chan[1] = chany[i][j];
      assign chan[2] = chanx[i][j-1];
      assign chan[3] = chany[i-1][j];

      connection_block #(.CW(CW)) u_cb (
        .chan(chan),
        .cfg (cfg[cb_cfg_offset(i, j, W, H, CW) +: CBB]),
        .pin (pins)
      );

      clb u_clb (
        .clk  (clk),
        .rst_n(rst_n),
        .in   (pins),
        .cfg  (cfg[clb_cfg_offset(i, j, W) +: CLB_CFG_BITS]),
        .out  (clb_out[i][j])
      );
    end
  end

  // ---------------------------------------------------------------- switch blocks
  for (genvar x = 0; x <= W; x++) begin : g_sbx
    for (genvar y = 0; y <= H; y++) begin : g_sby
      localparam int SBB = sb_cfg_bits(x, y, W, H, CW, SEG_LEN);
      localparam int CI  = (x < 1) ? 1 : x;
      localparam int CJ  = (y < 1) ? 1 : y;
      logic [3:0][HW-1:0] in_w, out_w;
      logic [1:0]         io;

      // arriving wires: from N the southbound half of chany(x,y+1), from E the westbound
      // half of chanx(x+1,y), from S the northbound half of chany(x,y), from W the
      // eastbound half of chanx(x,y)
      assign in_w[0] = (y < H) ? chany[x][(y < H) ? y + 1 : y][CW-1:HW] : '0;
      assign in_w[1] = (x < W) ? chanx[(x < W) ? x + 1 : x][y][CW-1:HW] : '0;
      assign in_w[2] = (y > 0) ? chany[x][y][HW-1:0] : '0;
      assign in_w[3] = (x > 0) ? chanx[x][y][HW-1:0] : '0;

      // IO input pads entering here, in the order bottom, top, left, right
      always_comb begin
        int m;
        m = 0;
        io = '0;
        if (y == 0 && x >= 1) begin io[m] = fabric_in[x - 1];             m++; end
        if (y == H && x >= 1) begin io[m] = fabric_in[W + x - 1];         m++; end
        if (x == 0 && y >= 1) begin io[m] = fabric_in[2*W + y - 1];       m++; end
        if (x == W && y >= 1) begin io[m] = fabric_in[2*W + H + y - 1]; m++; end
      end

      switch_block #(
        .W(W), .H(H), .X(x), .Y(y), .CW(CW), .SEG_LEN(SEG_LEN), .CFG_W(SBB)
      ) u_sb (
        .in_w   (in_w),
        .out_w  (out_w),
        .clb_out(clb_out[CI][CJ]),
        .io_in  (io),
        .cfg    (cfg[sb_cfg_offset(x, y, W, H, CW, SEG_LEN) +: SBB])
      );

      // departing wires
      if (y < H) begin : g_n
        assign chany[x][y+1][HW-1:0] = out_w[0];
      end
      if (x < W) begin : g_e
        assign chanx[x+1][y][HW-1:0] = out_w[1];
      end
      if (y > 0) begin : g_s
        assign chany[x][y][CW-1:HW] = out_w[2];
      end
      if (x > 0) begin : g_w
        assign chanx[x][y][CW-1:HW] = out_w[3];
      end
    end
  end

  // unused array entries
  for (genvar y = 0; y <= H; y++) begin : g_unused_x
    assign chanx[0][y] = '0;
  end
  for (genvar x = 0; x <= W; x++) begin : g_unused_y
    assign chany[x][0] = '0;
  end
  for (genvar x = 0; x <= W; x++) begin : g_unused_clb
    for (genvar y = 0; y <= H; y++) begin : g_c
      if (x == 0 || y == 0) begin : g_z
        assign clb_out[x][y] = '0;
      end
    end
  end

  // ---------------------------------------------------------------- IO sites
  for (genvar k = 0; k < NUM_IO; k++) begin : g_io
    logic [CW-1:0] chan;
    if (k < W) begin : g_b
      assign chan = chanx[k + 1][0];
    end else if (k < 2 * W) begin : g_t
      assign chan = chanx[k - W + 1][H];
    end else if (k < 2 * W + H) begin : g_l
      assign chan = chany[0][k - 2 * W + 1];
    end else begin : g_r
      assign chan = chany[W][k - 2 * W - H + 1];
    end

    io_block #(.CW(CW)) u_io (
      .chan     (chan),
      .cfg      (cfg[io_cfg_offset(k, W, H, CW, SEG_LEN) +: IOB]),
      .pad_in   (io_in[k]),
      .pad_out  (io_out[k]),
      .fabric_in(fabric_in[k])
    );
  end
endmodule
