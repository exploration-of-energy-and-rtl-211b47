// Three-dimensional fabric.
//
// N x N x N ALUs in N stacked N x N layers (layer z = 0 on top). Stacking
// brings many more ALUs within short reach, so a graph that needs a tall 2D
// fabric fits in a small cube. ALU (x, y, z) has index z*N*N + y*N + x. Each
// of its operands picks, with source SRC_WIN, one entry of its candidate list:
//   entries 0 .. N-1: the 4:1 interconnect from the layer above, ALU (j, y,
//     z-1) for entry j; in the first layer, fabric input in_i[j];
//   entries N ..: every other ALU on a straight line of N cells through
//     (x, y, z) - rows, columns, depth lines, the diagonals of each plane and
//     the four cube diagonals (the hopping links), in a fixed order.
// Unused entries read zero. Side inputs (SRC_SIDE) and the ALU constant are
// available as everywhere else. The main data flow is layer to layer.
// Early exits: three adjacent faces (+x, +y and the bottom, +z) carry N*N
// exit ports each, 3*N*N in all (48 for N = 4). The port at face f, position
// (a, b) reads the ALU that xsel_i[f][a][b] selects on the line of cells
// behind it. Final port n reads exit port osel_i[n] = f*N*N + a*N + b.
// Combinational. Circuit note: hopping links run in both directions and form
// structural combinational loops; a valid configuration never closes one.
// Defaults: 4 x 4 x 4, the 4:1 inter-layer interconnect, hopping links along
// every line of four and 48 exit ports follow the document; the exact
// candidate order, the choice of faces and the exit-port encoding are this
// design's choices.
module cgra_3d
  import cgra_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  word_t                     in_i   [NIN],
  input  cell_cfg_t                 cfg_i  [N*N*N],
  input  logic [$clog2(N)-1:0]      xsel_i [3][N][N],
  input  logic [$clog2(3*N*N)-1:0]  osel_i [NOUT],
  output word_t                     out_o  [NOUT]
);

  localparam int unsigned NC  = N * N * N;
  localparam int unsigned WIN = 32;          // candidate list length
  localparam int unsigned NXP = 3 * N * N;   // exit ports

  // Candidate k of cell i: an ALU index (< NC), NC + j for fabric input j, or
  // -1 for none.
  function automatic int cand(input int i, input int k);
    int x, y, z, n, t, dx, dy, dz, ax;
    int p[3], d[3], q[3];
    bit ok;
    x = i % N; y = (i / N) % N; z = i / (N * N);
    if (k < N) return (z == 0) ? NC + k : (z - 1) * N * N + y * N + k;
    n = N;
    p[0] = x; p[1] = y; p[2] = z;
    // 13 line directions: the first non-zero component is +1
    for (dz = -1; dz <= 1; dz++)
      for (dy = -1; dy <= 1; dy++)
        for (dx = -1; dx <= 1; dx++) begin
          d[0] = dx; d[1] = dy; d[2] = dz;
          ax = -1;
          for (int a = 0; a < 3; a++) if (ax < 0 && d[a] != 0) ax = a;
          if (ax < 0 || d[ax] != 1) continue;
          // parameter t along the line, taken from the first moving axis
          t = p[ax];
          ok = 1'b1;
          for (int a = 0; a < 3; a++)
            if (d[a] == 1 && p[a] != t) ok = 1'b0;
            else if (d[a] == -1 && p[a] != N - 1 - t) ok = 1'b0;
          if (!ok) continue;
          for (int u = 0; u < N; u++) begin
            if (u == t) continue;
            for (int a = 0; a < 3; a++)
              q[a] = (d[a] == 1) ? u : (d[a] == -1) ? N - 1 - u : p[a];
            if (n == k) return q[2] * N * N + q[1] * N + q[0];
            n++;
          end
        end
    return -1;
  endfunction

  for (genvar i = 0; i < NC; i++) begin : g_alu
    word_t win [WIN];
    word_t y;
    for (genvar k = 0; k < WIN; k++) begin : g_c
      localparam int CI = cand(i, k);
      if (CI < 0) begin : g_none
        assign win[k] = '0;
      end else if (CI >= NC) begin : g_in
        assign win[k] = in_i[(CI - NC) % NIN];
      end else begin : g_alu_src
        assign win[k] = g_alu[CI].y;
      end
    end
    pe #(.WIN(WIN)) u_pe (
      .cfg_i(cfg_i[i]), .win_i(win), .side_i(in_i),
      .x1_i('0), .x2_i('0), .y_o(y)
    );
  end

  // Exit ports: face 0 (+x) position (y, z) looks along x; face 1 (+y)
  // position (x, z) along y; face 2 (+z) position (x, y) along z.
  word_t xp [NXP];
  for (genvar f = 0; f < 3; f++) begin : g_face
    for (genvar a = 0; a < N; a++) begin : g_a
      for (genvar b = 0; b < N; b++) begin : g_b
        word_t line [N];
        for (genvar u = 0; u < N; u++) begin : g_u
          localparam int unsigned CI = (f == 0) ? b * N * N + a * N + u :
                                       (f == 1) ? b * N * N + u * N + a :
                                                  u * N * N + b * N + a;
          assign line[u] = g_alu[CI].y;
        end
        assign xp[f*N*N + a*N + b] = line[xsel_i[f][a][b]];
      end
    end
  end

  always_comb
    for (int n = 0; n < NOUT; n++)
      out_o[n] = (int'(osel_i[n]) < NXP) ? xp[osel_i[n]] : '0;

endmodule
