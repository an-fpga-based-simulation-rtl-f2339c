// tb_position_cntrl: for every neuron of several grids and all three connection
// schemes, compares row, column and the neighbour list with an independently computed
// one (slot order N, E, S, W, NE, SE, SW, NW; no wrap-around).
module tb_position_cntrl;
  import see_pkg::*;
  neuron_t neuron;
  logic [15:0] width, height, row, col;
  conn_e mode;
  neuron_t nbr [NBR];
  logic [NBR-1:0] nbr_vld;
  int checks = 0, failures = 0;

  position_cntrl dut (.neuron, .width, .height, .mode, .nbr, .nbr_vld, .row, .col);

  task automatic one(int w, int hgt, conn_e m);
    int dr [8] = '{-1, 0, 1, 0, -1, 1, 1, -1};
    int dc [8] = '{ 0, 1, 0, -1, 1, 1, -1, -1};
    for (int k = 0; k < w * hgt; k++) begin
      int r, c, rr, cc;
      bit ok;
      neuron = NEURON_W'(k); width = 16'(w); height = 16'(hgt); mode = m;
      #1;
      r = 0; c = k;
      while (c >= w) begin c -= w; r++; end
      ok = (int'(row) == r) && (int'(col) == c);
      for (int s = 0; s < 8; s++) begin
        bit v;
        rr = r + dr[s]; cc = c + dc[s];
        if (m == CONN_FC) begin
          v = (s == 0);
          if (v && nbr[s] != neuron) ok = 0;
        end else begin
          v = rr >= 0 && rr < hgt && cc >= 0 && cc < w && (m == CONN_8N || s < 4);
          if (v && int'(nbr[s]) != rr * w + cc) ok = 0;
        end
        if (nbr_vld[s] != v) ok = 0;
      end
      checks++;
      if (!ok) begin failures++; $display("FAIL k=%0d w=%0d mode=%0d", k, w, m); end
    end
  endtask

  initial begin
    one(5, 4, CONN_4N);
    one(5, 4, CONN_8N);
    one(10, 10, CONN_8N);
    one(30, 30, CONN_4N);
    one(7, 3, CONN_FC);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
