// tb_qnoc_route: self-checking test of the routing function.
//
// One routing instance per router position of a 4x4 mesh. For every source
// and target the test walks the path hop by hop using the instances'
// decisions and checks, independently of how the function is written, that
//  * the path ends at the target with a local delivery,
//  * its length is the Manhattan distance (shortest path),
//  * it moves along the row (X) before the column when the target lies
//    east of the source, and along the column (Y) first otherwise,
//  * the path back from target to source is the same path reversed.
module tb_qnoc_route;
  import qnoc_pkg::*;

  localparam int ROWS = 4;
  localparam int COLS = 4;

  int checks = 0;
  int failures = 0;

  logic [COORD_W-1:0] tr [ROWS*COLS];
  logic [COORD_W-1:0] tc [ROWS*COLS];
  port_e              op [ROWS*COLS];

  for (genvar r = 0; r < ROWS; r++) begin : g_r
    for (genvar c = 0; c < COLS; c++) begin : g_c
      qnoc_route #(.MY_ROW(r), .MY_COL(c)) dut (
        .tgt_row(tr[r*COLS+c]), .tgt_col(tc[r*COLS+c]), .out_port(op[r*COLS+c]));
    end
  end

  // Walk from (sr,sc) to (dr,dc); returns the list of visited nodes.
  task automatic walk(input int sr, input int sc, input int dr, input int dc,
                      output int nodes[$], output port_e moves[$], output bit ok);
    int r, c;
    r = sr;
    c = sc;
    nodes = {};
    moves = {};
    ok = 1;
    for (int n = 0; n < ROWS*COLS; n++) begin
      tr[n] = COORD_W'(dr);
      tc[n] = COORD_W'(dc);
    end
    #1;
    for (int hop = 0; hop < 2*(ROWS+COLS); hop++) begin
      port_e p;
      nodes.push_back(r*COLS+c);
      p = op[r*COLS+c];
      moves.push_back(p);
      if (p == P_LOCAL) return;
      case (p)
        P_NORTH: r--;
        P_SOUTH: r++;
        P_EAST:  c++;
        P_WEST:  c--;
        default: ;
      endcase
      if (r < 0 || r >= ROWS || c < 0 || c >= COLS) begin ok = 0; return; end
    end
    ok = 0;
  endtask

  initial begin
    for (int s = 0; s < ROWS*COLS; s++) begin
      for (int d = 0; d < ROWS*COLS; d++) begin
        int sr, sc, dr, dc;
        int fwd[$], back[$];
        port_e mf[$], mb[$];
        bit ok1, ok2, xy_ok;
        int mdist;
        sr = s / COLS; sc = s % COLS; dr = d / COLS; dc = d % COLS;
        walk(sr, sc, dr, dc, fwd, mf, ok1);
        walk(dr, dc, sr, sc, back, mb, ok2);
        mdist = ((dr > sr) ? dr - sr : sr - dr) + ((dc > sc) ? dc - sc : sc - dc);
        checks++;
        if (!ok1 || !ok2 || fwd[fwd.size()-1] != d || back[back.size()-1] != s) begin
          failures++;
          $display("FAIL: path %0d->%0d does not arrive", s, d);
          continue;
        end
        checks++;
        if (fwd.size() != mdist + 1) begin
          failures++;
          $display("FAIL: path %0d->%0d has %0d hops, distance %0d", s, d, fwd.size()-1, mdist);
        end
        // Order of dimensions.
        xy_ok = 1;
        begin
          bit seen_second;
          seen_second = 0;
          for (int k = 0; k < mf.size()-1; k++) begin
            bit is_x = (mf[k] == P_EAST || mf[k] == P_WEST);
            bit first_dim = (dc > sc) ? is_x : !is_x;
            if (!first_dim) seen_second = 1;
            else if (seen_second) xy_ok = 0;
          end
        end
        checks++;
        if (!xy_ok) begin
          failures++;
          $display("FAIL: path %0d->%0d takes the dimensions in the wrong order", s, d);
        end
        checks++;
        if (back.size() != fwd.size()) begin
          failures++;
          $display("FAIL: path %0d->%0d is not symmetric", s, d);
        end else begin
          for (int k = 0; k < fwd.size(); k++)
            if (fwd[k] != back[back.size()-1-k]) begin
              failures++;
              $display("FAIL: path %0d->%0d is not symmetric", s, d);
              break;
            end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
