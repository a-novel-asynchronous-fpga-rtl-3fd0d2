`timescale 1ns/1ps
// gapla_top: a globally asynchronous, locally synchronous programmable
// logic array. ROWS x COLS asynchronous islands sit in a mesh. Each island
// talks to its neighbours in two ways:
//  * Direct links between facing wrappers of adjacent islands (east of one
//    to west of the next, south to north): 8 handshake pairs and 64 data
//    wires. Output ports 0..3 of each wrapper drive input ports 0..3 of the
//    facing wrapper, and data registers 0..63 of the two wrappers share the
//    64 wires, each wire driven by whichever side has it as an output.
//  * Global routing channels: a horizontal channel runs above and below
//    every island row, a vertical one left and right of every column, each
//    segment carrying 32 handshake pairs and 256 data wires between two
//    routing switch boxes (rsb) at the channel crossings. The two wrappers
//    beside a segment tap it: output ports 4..7 and input ports 4..7 of the
//    wrapper above / left of it use pair tracks 0..3 and 4..7, those of the
//    wrapper below / right use pair tracks 8..11 and 12..15. Registers
//    64..127 of both wrappers share data tracks 0..63 of the segment (so
//    data keeps its track number from segment to segment, as the data
//    switch requires); a shared track must be driven by one of them only.
//    Pair tracks 16..31 and data tracks 64..255 run from box to box. A
//    tapped track is seen by both boxes at the segment's ends; whichever
//    one is configured to use it carries the pair on.
// Every request leaving a wrapper passes a fixed delay element so that its
// bundled data settles first. Box sides at the array edge are tied off.
// The mesh, link and channel widths and the delay elements follow the
// architecture; the 2x2 default size is that of its block diagram; the
// split of ports and registers between direct links and channels and the
// track assignment are this design's. The synchronous logic blocks are not
// part of this RTL: their side of every wrapper and their clocks are ports,
// indexed [row][column][wrapper side]. All configuration is static.
// Tools report a combinational loop through the channel data wires
// (b_dout): a segment's data track leaving box A enters box B, and the
// same track leaving box B enters box A, so the two data switches form a
// loop that closes only if both are configured to send the track back the
// way it came. A meaningful configuration never does that (data flows one
// way along a route), so no path is active around the loop. The latches
// reported inside are the asynchronous cells of the wrappers and boxes.
module gapla_top
  import gapla_pkg::*;
#(
  parameter int unsigned ROWS   = 2,
  parameter int unsigned COLS   = 2,
  parameter int unsigned TRACKS = CHAN_PAIRS,
  parameter int unsigned WIDTH  = CHAN_BITS,
  localparam int unsigned NIN  = N_IN_PORTS,
  localparam int unsigned NOUT = N_OUT_PORTS,
  localparam int unsigned NREG = N_IO_REGS,
  localparam int unsigned NSRC = 4 * TRACKS + 14,
  localparam int unsigned NSNK = 4 * TRACKS + 26,
  localparam int unsigned SW   = $clog2(NSRC)
) (
  input  logic                                              rst,
  // island configuration
  input  logic [ROWS-1:0][COLS-1:0][3:0][7:0]               dly_cfg,
  input  logic [ROWS-1:0][COLS-1:0][3:0]                    grp_en,
  input  logic [ROWS-1:0][COLS-1:0][N_CDU-1:0][1:0]         cdu_sel,
  input  io_reg_cfg_t [ROWS-1:0][COLS-1:0][3:0][NREG-1:0]   reg_cfg,
  output logic [ROWS-1:0][COLS-1:0][3:0]                    cfg_err,
  // routing switch box configuration, [row][column] of the crossing
  input  logic [ROWS:0][COLS:0][NSNK-1:0]                   rsb_snk_en,
  input  logic [ROWS:0][COLS:0][NSNK-1:0][SW-1:0]           rsb_snk_sel,
  input  logic [ROWS:0][COLS:0][1:0][3:0]                   rsb_fanout_mask,
  input  logic [ROWS:0][COLS:0][1:0][3:0]                   rsb_fanin_mask,
  input  logic [ROWS:0][COLS:0][1:0][3:0]                   rsb_arb_mask,
  input  logic [ROWS:0][COLS:0][1:0][3:0]                   rsb_merge_mask,
  input  lrsb_cfg_t [ROWS:0][COLS:0][3:0][WIDTH-1:0]        rsb_data_cfg,
  // synchronous logic block side of every island
  output logic [ROWS-1:0][COLS-1:0][3:0]                    local_clk,
  output logic [ROWS-1:0][COLS-1:0][N_CDU-1:0]              cdu_clk,
  input  logic [ROWS-1:0][COLS-1:0][3:0][NIN-1:0]           in_en,
  output logic [ROWS-1:0][COLS-1:0][3:0][NIN-1:0]           in_load,
  input  logic [ROWS-1:0][COLS-1:0][3:0][NOUT-1:0]          out_en,
  output logic [ROWS-1:0][COLS-1:0][3:0][NOUT-1:0]          out_load,
  input  logic [ROWS-1:0][COLS-1:0][3:0][NREG-1:0]          lb_dout,
  output logic [ROWS-1:0][COLS-1:0][3:0][NREG-1:0]          lb_din
);

  localparam int unsigned DP = DIRECT_PAIRS / 2;  // pairs per direction of a direct link
  localparam int unsigned DB = DIRECT_BITS;       // registers 0..DB-1 on the direct link
  localparam int unsigned CP = NOUT - DP;         // ports per direction on a channel
  localparam int unsigned CB = NREG - DB;         // registers DB.. on a channel

  // wrapper interconnect side
  logic [ROWS-1:0][COLS-1:0][3:0][NIN-1:0]  w_in_req, w_in_ack;
  logic [ROWS-1:0][COLS-1:0][3:0][NOUT-1:0] w_out_req, w_out_req_d, w_out_ack;
  logic [ROWS-1:0][COLS-1:0][3:0][NREG-1:0] w_pin_in, w_pin_out, w_pin_oe, w_pin_drv;

  // routing switch box sides
  logic [ROWS:0][COLS:0][3:0][TRACKS-1:0]   b_in_req, b_in_ack, b_out_req, b_out_ack;
  logic [ROWS:0][COLS:0][3:0][WIDTH-1:0]    b_din, b_dout;

  // ---------------------------------------------------------------- islands
  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      async_island #(.NIN(NIN), .NOUT(NOUT), .NREG(NREG)) u_island (
        .rst       (rst),
        .dly_cfg   (dly_cfg[r][c]),
        .grp_en    (grp_en[r][c]),
        .cdu_sel   (cdu_sel[r][c]),
        .reg_cfg   (reg_cfg[r][c]),
        .cfg_err   (cfg_err[r][c]),
        .local_clk (local_clk[r][c]),
        .cdu_clk   (cdu_clk[r][c]),
        .in_en     (in_en[r][c]),
        .in_load   (in_load[r][c]),
        .out_en    (out_en[r][c]),
        .out_load  (out_load[r][c]),
        .lb_dout   (lb_dout[r][c]),
        .lb_din    (lb_din[r][c]),
        .in_req    (w_in_req[r][c]),
        .in_ack    (w_in_ack[r][c]),
        .out_req   (w_out_req[r][c]),
        .out_ack   (w_out_ack[r][c]),
        .pin_in    (w_pin_in[r][c]),
        .pin_out   (w_pin_out[r][c]),
        .pin_oe    (w_pin_oe[r][c])
      );

      for (genvar w = 0; w < 4; w++) begin : g_w
        assign w_pin_drv[r][c][w] = w_pin_out[r][c][w] & w_pin_oe[r][c][w];
        for (genvar p = 0; p < NOUT; p++) begin : g_dly
          req_delay u_dly (.req_in(w_out_req[r][c][w][p]), .req_out(w_out_req_d[r][c][w][p]));
        end
      end
    end
  end

  // --------------------------------------------------- wrapper wiring rules
  // Direct-link half (ports 0..DP-1, registers 0..DB-1) of wrapper w of
  // island (r,c) faces wrapper (w+2)%4 of the neighbour in direction w.
  // Channel half (ports DP.., registers DB..) taps the segment beside it.
  function automatic bit has_nb(int r, int c, int w);
    case (w)
      0:       return r > 0;
      1:       return c < COLS - 1;
      2:       return r < ROWS - 1;
      default: return c > 0;
    endcase
  endfunction

  always_comb begin
    w_in_req  = '0;
    w_out_ack = '0;
    w_pin_in  = '0;
    b_in_req  = '0;
    b_out_ack = '0;
    b_din     = '0;

    for (int r = 0; r < ROWS; r++) begin
      for (int c = 0; c < COLS; c++) begin
        for (int w = 0; w < 4; w++) begin
          int nr, nc, nw;
          int br0, bc0, bs0, br1, bc1, bs1, toff;
          // direct link
          nr = (w == 0) ? r - 1 : (w == 2) ? r + 1 : r;
          nc = (w == 1) ? c + 1 : (w == 3) ? c - 1 : c;
          nw = (w + 2) % 4;
          if (has_nb(r, c, w)) begin
            for (int p = 0; p < DP; p++) begin
              w_in_req[r][c][w][p]  = w_out_req_d[nr][nc][nw][p];
              w_out_ack[r][c][w][p] = w_in_ack[nr][nc][nw][p];
            end
            for (int b = 0; b < DB; b++)
              w_pin_in[r][c][w][b] = w_pin_drv[nr][nc][nw][b];
          end
          // channel segment beside wrapper w: its two end boxes (row, column,
          // side of the box that faces the segment) and the wrapper's offset
          case (w)
            0: begin br0 = r;     bc0 = c;     bs0 = 1; br1 = r;     bc1 = c + 1; bs1 = 3; toff = 2 * CP; end
            2: begin br0 = r + 1; bc0 = c;     bs0 = 1; br1 = r + 1; bc1 = c + 1; bs1 = 3; toff = 0;      end
            3: begin br0 = r;     bc0 = c;     bs0 = 2; br1 = r + 1; bc1 = c;     bs1 = 0; toff = 2 * CP; end
            default: begin br0 = r; bc0 = c + 1; bs0 = 2; br1 = r + 1; bc1 = c + 1; bs1 = 0; toff = 0; end
          endcase
          for (int p = 0; p < CP; p++) begin
            // output port DP+p drives pair track toff+p into both boxes
            b_in_req[br0][bc0][bs0][toff + p] = w_out_req_d[r][c][w][DP + p];
            b_in_req[br1][bc1][bs1][toff + p] = w_out_req_d[r][c][w][DP + p];
            w_out_ack[r][c][w][DP + p] = b_in_ack[br0][bc0][bs0][toff + p] | b_in_ack[br1][bc1][bs1][toff + p];
            // input port DP+p listens on pair track toff+CP+p from both boxes
            w_in_req[r][c][w][DP + p] = b_out_req[br0][bc0][bs0][toff + CP + p] | b_out_req[br1][bc1][bs1][toff + CP + p];
            b_out_ack[br0][bc0][bs0][toff + CP + p] = w_in_ack[r][c][w][DP + p];
            b_out_ack[br1][bc1][bs1][toff + CP + p] = w_in_ack[r][c][w][DP + p];
          end
          // shared data taps: what either wrapper drives goes into both boxes
          for (int b = 0; b < CB; b++) begin
            b_din[br0][bc0][bs0][b] = b_din[br0][bc0][bs0][b] | w_pin_drv[r][c][w][DB + b];
            b_din[br1][bc1][bs1][b] = b_din[br1][bc1][bs1][b] | w_pin_drv[r][c][w][DB + b];
          end
        end
      end
    end

    // channel half of every wrapper reads its segment's shared data tracks:
    // the wrapper drives seen by the boxes plus what the boxes put out
    for (int r = 0; r < ROWS; r++) begin
      for (int c = 0; c < COLS; c++) begin
        for (int w = 0; w < 4; w++) begin
          int br0, bc0, bs0, br1, bc1, bs1;
          case (w)
            0:       begin br0 = r;     bc0 = c;     bs0 = 1; br1 = r;     bc1 = c + 1; bs1 = 3; end
            2:       begin br0 = r + 1; bc0 = c;     bs0 = 1; br1 = r + 1; bc1 = c + 1; bs1 = 3; end
            3:       begin br0 = r;     bc0 = c;     bs0 = 2; br1 = r + 1; bc1 = c;     bs1 = 0; end
            default: begin br0 = r;     bc0 = c + 1; bs0 = 2; br1 = r + 1; bc1 = c + 1; bs1 = 0; end
          endcase
          for (int b = 0; b < CB; b++)
            w_pin_in[r][c][w][DB + b] = b_din[br0][bc0][bs0][b] | b_dout[br0][bc0][bs0][b] | b_dout[br1][bc1][bs1][b];
        end
      end
    end

    // box-to-box tracks of every segment
    for (int i = 0; i <= ROWS; i++) begin
      for (int j = 0; j <= COLS; j++) begin
        for (int t = 4 * CP; t < TRACKS; t++) begin
          if (j < COLS) begin  // horizontal segment: east side of (i,j) to west side of (i,j+1)
            b_in_req[i][j + 1][3][t] = b_out_req[i][j][1][t];
            b_out_ack[i][j][1][t]    = b_in_ack[i][j + 1][3][t];
            b_in_req[i][j][1][t]     = b_out_req[i][j + 1][3][t];
            b_out_ack[i][j + 1][3][t] = b_in_ack[i][j][1][t];
          end
          if (i < ROWS) begin  // vertical segment: south side of (i,j) to north side of (i+1,j)
            b_in_req[i + 1][j][0][t] = b_out_req[i][j][2][t];
            b_out_ack[i][j][2][t]    = b_in_ack[i + 1][j][0][t];
            b_in_req[i][j][2][t]     = b_out_req[i + 1][j][0][t];
            b_out_ack[i + 1][j][0][t] = b_in_ack[i][j][2][t];
          end
        end
        for (int t = CB; t < WIDTH; t++) begin
          if (j < COLS) begin
            b_din[i][j + 1][3][t] = b_dout[i][j][1][t];
            b_din[i][j][1][t]     = b_dout[i][j + 1][3][t];
          end
          if (i < ROWS) begin
            b_din[i + 1][j][0][t] = b_dout[i][j][2][t];
            b_din[i][j][2][t]     = b_dout[i + 1][j][0][t];
          end
        end
      end
    end
  end

  // ------------------------------------------------------ routing switch boxes
  for (genvar i = 0; i <= ROWS; i++) begin : g_brow
    for (genvar j = 0; j <= COLS; j++) begin : g_bcol
      rsb #(.TRACKS(TRACKS), .WIDTH(WIDTH)) u_rsb (
        .rst         (rst),
        .snk_en      (rsb_snk_en[i][j]),
        .snk_sel     (rsb_snk_sel[i][j]),
        .fanout_mask (rsb_fanout_mask[i][j]),
        .fanin_mask  (rsb_fanin_mask[i][j]),
        .arb_mask    (rsb_arb_mask[i][j]),
        .merge_mask  (rsb_merge_mask[i][j]),
        .data_cfg    (rsb_data_cfg[i][j]),
        .in_req      (b_in_req[i][j]),
        .in_ack      (b_in_ack[i][j]),
        .out_req     (b_out_req[i][j]),
        .out_ack     (b_out_ack[i][j]),
        .din         (b_din[i][j]),
        .dout        (b_dout[i][j])
      );
    end
  end

endmodule
