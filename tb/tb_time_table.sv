// tb_time_table: self-checking test of the switching-sequence builder.
// Every triangle of the three-level diagram (all triples of mutually adjacent
// lattice points, found here by search) is applied with random duty cycles,
// random vertex order, random load currents and both capacitor conditions.
// The expected table is worked out independently: the real switching
// combinations of each vector by search over all 27 leg-level triples, the
// mid-point current of each combination from the signed phase currents, and
// the 1/3 : 2/3 (small vectors), 1/3 each (zero vector) and whole (other
// vectors) split of each vector's time over both half periods. Also checked:
// the ascending / mirrored order of the sequence, one-level steps between
// successive intervals, and that the times add up to the period.
module tb_time_table;
  import svm_pkg::*;

  localparam int unsigned P   = 62500;
  localparam int unsigned T_W = $clog2(P + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  logic Udc, i_u, i_v, i_w;
  logic [IDX_W-1:0] switch_V1_index, switch_V2_index, switch_V3_index;
  logic [D_W-1:0] d_v1, d_v2, d_v3;
  logic [T_W-1:0] time_o [N_SLOTS];
  sw_state_t state_o [N_SLOTS];
  int checks = 0, failures = 0;
  int n_zero_tri = 0, n_outer_tri = 0, n_bal_hi = 0, n_bal_lo = 0;

  time_table dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int lat [19][3] = '{
    '{0, 0, 0}, '{1, 0, -1}, '{0, 1, -1}, '{-1, 1, 0}, '{-1, 0, 1}, '{0, -1, 1}, '{1, -1, 0},
    '{2, 0, -2}, '{1, 1, -2}, '{0, 2, -2}, '{-1, 2, -1}, '{-2, 2, 0}, '{-2, 1, 1}, '{-2, 0, 2},
    '{-1, -1, 2}, '{0, -2, 2}, '{1, -2, 1}, '{2, -2, 0}, '{2, -1, -1}};
  int tris [$][3];

  function automatic bit adjacent(input int a, input int b);
    int da, db, dc;
    da = lat[a][0] - lat[b][0]; db = lat[a][1] - lat[b][1]; dc = lat[a][2] - lat[b][2];
    return (da * da + db * db + dc * dc) == 2;
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int iabs(input int x);
    return x < 0 ? -x : x;
  endfunction

  initial begin
    int v [3], d [3], cur [3];
    int exp_t [14];
    int exp_s [14][3];
    bit exp_v [14];
    int total;
    for (int a = 0; a < 19; a++)
      for (int b = a + 1; b < 19; b++)
        for (int c = b + 1; c < 19; c++)
          if (adjacent(a, b) && adjacent(b, c) && adjacent(a, c)) tris.push_back('{a, b, c});
    check(tris.size() == 24, "24 triangles in the diagram");

    Udc = 0; {i_u, i_v, i_w} = 0;
    switch_V1_index = 0; switch_V2_index = 1; switch_V3_index = 2;
    d_v1 = D_W'(D_ONE); d_v2 = 0; d_v3 = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    for (int n = 0; n < 3000; n++) begin
      int t, r, sh;
      t = int'($urandom % tris.size());
      sh = int'($urandom % 3);
      for (int k = 0; k < 3; k++) v[k] = tris[t][(k + sh) % 3];
      d[0] = int'($urandom % (D_ONE + 1));
      d[1] = int'($urandom % (D_ONE - d[0] + 1));
      d[2] = int'(D_ONE) - d[0] - d[1];
      // phase currents: nonzero, zero sum, no two-phase sum of zero
      do begin
        cur[0] = int'($urandom % 2001) - 1000;
        cur[1] = int'($urandom % 2001) - 1000;
        cur[2] = -cur[0] - cur[1];
      end while (cur[0] == 0 || cur[1] == 0 || cur[2] == 0);
      Udc = 1'($urandom);
      i_u = cur[0] > 0; i_v = cur[1] > 0; i_w = cur[2] > 0;
      switch_V1_index = IDX_W'(v[0]); switch_V2_index = IDX_W'(v[1]); switch_V3_index = IDX_W'(v[2]);
      d_v1 = D_W'(d[0]); d_v2 = D_W'(d[1]); d_v3 = D_W'(d[2]);
      if (v[0] == 0 || v[1] == 0 || v[2] == 0) n_zero_tri++;
      if (v[0] >= 7 && v[1] >= 7 || v[1] >= 7 && v[2] >= 7 || v[0] >= 7 && v[2] >= 7) n_outer_tri++;

      // independent expected table
      for (int j = 0; j < 14; j++) begin
        exp_t[j] = 0; exp_v[j] = 0;
      end
      for (int k = 0; k < 3; k++) begin
        int st [$][3];
        int i0 [$];
        st.delete();
        i0.delete();
        for (int a = -1; a <= 1; a++)
          for (int b = -1; b <= 1; b++)
            for (int c = -1; c <= 1; c++)
              if (a - b == lat[v[k]][0] && b - c == lat[v[k]][1]) begin
                int q;
                st.push_back('{a, b, c});
                q = 0;
                if (a == 0) q += cur[0];
                if (b == 0) q += cur[1];
                if (c == 0) q += cur[2];
                i0.push_back(q);
              end
        for (int e = 0; e < st.size(); e++) begin
          int m, s, tm;
          s = st[e][0] + st[e][1] + st[e][2];
          if (st.size() == 3) m = 1;
          else if (st.size() == 1) m = 3;
          else begin
            // balancing: with U_C1 high the mid-point current must be negative
            if ((Udc && i0[e] < 0) || (!Udc && i0[e] > 0)) begin
              m = 2;
              if (Udc) n_bal_hi++; else n_bal_lo++;
            end else m = 1;
          end
          tm = int'((longint'(d[k]) * P * m + 3 * longint'(D_ONE)) / (6 * longint'(D_ONE)));
          check(!exp_v[s + 3], "one combination per level sum");
          exp_v[s + 3] = 1; exp_t[s + 3] = tm; exp_s[s + 3] = st[e];
          exp_v[10 - s] = 1; exp_t[10 - s] = tm; exp_s[10 - s] = st[e];
        end
      end

      @(negedge clk);
      total = 0;
      for (int j = 0; j < 14; j++) begin
        total += int'(time_o[j]);
        if (exp_v[j] && exp_t[j] > 0) begin
          check(iabs(int'(time_o[j]) - exp_t[j]) <= 1, $sformatf("time of interval %0d: %0d expected %0d", j + 1, time_o[j], exp_t[j]));
          check(int'(state_o[j].u) == exp_s[j][0] && int'(state_o[j].v) == exp_s[j][1] &&
                int'(state_o[j].w) == exp_s[j][2], $sformatf("state of interval %0d", j + 1));
        end else begin
          check(time_o[j] == 0, $sformatf("interval %0d empty", j + 1));
        end
      end
      check(iabs(total - int'(P)) <= 6, $sformatf("times add up to the period (%0d)", total));
      // successive intervals of the sequence differ by one level in one leg
      begin
        int last;
        last = -1;
        for (int j = 0; j < 14; j++) begin
          if (exp_v[j]) begin
            if (last >= 0) begin
              int dl;
              dl = iabs(int'(state_o[j].u) - int'(state_o[last].u)) +
                   iabs(int'(state_o[j].v) - int'(state_o[last].v)) +
                   iabs(int'(state_o[j].w) - int'(state_o[last].w));
              // the two halves meet in the same combination
              check(dl == 1 || (dl == 0 && last < 7 && j >= 7), "one-level step between intervals");
            end
            last = j;
          end
        end
      end
    end
    check(n_zero_tri > 100 && n_outer_tri > 100 && n_bal_hi > 100 && n_bal_lo > 100,
          "zero-vector and outer triangles, both capacitor conditions");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
