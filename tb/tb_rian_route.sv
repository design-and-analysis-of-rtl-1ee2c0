// tb_rian_route: self-checking test of the router's decoder.
//
// For every node position and every destination of an 8x8 array, in the star
// and mesh topologies and with and without the bottom-to-top wrap, compares
// the chosen port with a reference computed here, and walks the flit hop by
// hop to check that it reaches the destination in the minimal number of hops
// (Chebyshev distance for the star, Manhattan distance for the mesh, with the
// row distance measured around the wrap when it exists).
module tb_rian_route;
  import rian_pkg::*;
  localparam int G = 8;
  int checks = 0, failures = 0;

  logic [COORD_W-1:0] my_x, my_y;
  ctrl_flit_t flit;
  logic [3:0] dir_sw, dir_sn, dir_mw, dir_mn;

  rian_route #(.GRID_Y(G), .TOPO(TOPO_STAR), .WRAP(1'b1)) u_sw (.my_x, .my_y, .flit, .dir(dir_sw));
  rian_route #(.GRID_Y(G), .TOPO(TOPO_STAR), .WRAP(1'b0)) u_sn (.my_x, .my_y, .flit, .dir(dir_sn));
  rian_route #(.GRID_Y(G), .TOPO(TOPO_MESH), .WRAP(1'b1)) u_mw (.my_x, .my_y, .flit, .dir(dir_mw));
  rian_route #(.GRID_Y(G), .TOPO(TOPO_MESH), .WRAP(1'b0)) u_mn (.my_x, .my_y, .flit, .dir(dir_mn));

  localparam int SX [8] = '{0, 1, 1, 1, 0, -1, -1, -1};
  localparam int SY [8] = '{-1, -1, 0, 1, 1, 1, 0, -1};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int iabs(input int v);
    return v < 0 ? -v : v;
  endfunction

  // Signed row step the reference wants, or 0.
  function automatic int ref_dy(input int y, input int ty, input bit wrap);
    int d = ty - y;
    if (wrap && 2 * d > G) d -= G;
    if (wrap && 2 * d < -G) d += G;
    return d;
  endfunction

  function automatic int ref_dir(input int x, input int y, input int tx, input int ty,
                                 input bit star, input bit wrap);
    int dx = tx - x, dy = ref_dy(y, ty, wrap);
    int sx = dx > 0 ? 1 : dx < 0 ? -1 : 0;
    int sy = dy > 0 ? 1 : dy < 0 ? -1 : 0;
    if (!star && sx != 0) sy = 0;
    if (sx == 0 && sy == 0) return 8;
    for (int d = 0; d < 8; d++) if (SX[d] == sx && SY[d] == sy) return d;
    return -1;
  endfunction

  // Walk the flit through the array using the DUT; returns hops taken.
  task automatic walk(input int x0, input int y0, input int tx, input int ty,
                      input int cfg, output int hops);
    int x = x0, y = y0;
    logic [3:0] d;
    hops = 0;
    flit.dst_x = COORD_W'(tx); flit.dst_y = COORD_W'(ty); flit.dst_reg = '0;
    forever begin
      my_x = COORD_W'(x); my_y = COORD_W'(y);
      #1;
      d = (cfg == 0) ? dir_sw : (cfg == 1) ? dir_sn : (cfg == 2) ? dir_mw : dir_mn;
      if (d == 4'd8 || hops > 40) break;
      x += SX[d]; y += SY[d];
      if (cfg == 0 || cfg == 2) y = (y + G) % G;
      hops++;
      if (x < 0 || x >= G || y < 0 || y >= G) begin hops = 99; break; end
    end
  endtask

  initial begin
    for (int x = 0; x < G; x++)
      for (int y = 0; y < G; y++)
        for (int tx = 0; tx < G; tx++)
          for (int ty = 0; ty < G; ty++) begin
            int hops, want, dyw, dyn;
            my_x = COORD_W'(x); my_y = COORD_W'(y);
            flit.dst_x = COORD_W'(tx); flit.dst_y = COORD_W'(ty); flit.dst_reg = 6'(x + y);
            #1;
            check(int'(dir_sw) == ref_dir(x, y, tx, ty, 1, 1), "star wrap dir");
            check(int'(dir_sn) == ref_dir(x, y, tx, ty, 1, 0), "star dir");
            check(int'(dir_mw) == ref_dir(x, y, tx, ty, 0, 1), "mesh wrap dir");
            check(int'(dir_mn) == ref_dir(x, y, tx, ty, 0, 0), "mesh dir");
            dyw = iabs(ref_dy(y, ty, 1));
            dyn = iabs(ty - y);
            walk(x, y, tx, ty, 0, hops);
            want = iabs(tx - x) > dyw ? iabs(tx - x) : dyw;
            check(hops == want, $sformatf("star wrap hops %0d want %0d", hops, want));
            walk(x, y, tx, ty, 1, hops);
            want = iabs(tx - x) > dyn ? iabs(tx - x) : dyn;
            check(hops == want, "star hops");
            walk(x, y, tx, ty, 2, hops);
            check(hops == iabs(tx - x) + dyw, "mesh wrap hops");
            walk(x, y, tx, ty, 3, hops);
            check(hops == iabs(tx - x) + dyn, "mesh hops");
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
