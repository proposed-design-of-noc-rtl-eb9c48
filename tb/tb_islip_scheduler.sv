// tb_islip_scheduler: compares the iSLIP scheduler with a behavioural model
// of the algorithm (request, grant from the grant pointer, accept from the
// accept pointer, pointers moved only by first-iteration accepts) on random
// request matrices, for one and for three iterations. It also checks that the
// match is a legal matching within the requests, that three iterations of a
// 4 x 4 scheduler leave no free input-output pair with a request, and that
// under full load a one-iteration scheduler desynchronises its pointers and
// reaches a full match (4 transfers per cycle) within 4 cycles.
module tb_islip_scheduler;
  localparam int N = 4, M = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst;
  logic [N-1:0][M-1:0] req;
  logic [N-1:0][M-1:0] match1, match3;
  logic [N-1:0]        im1, im3;
  logic [N-1:0][1:0]   ip1, ip3;

  islip_scheduler #(.N(N), .M(M), .ITER(1)) dut1 (
    .clk, .rst, .update(1'b1), .req, .match(match1), .in_matched(im1), .in_port(ip1));
  islip_scheduler #(.N(N), .M(M), .ITER(3)) dut3 (
    .clk, .rst, .update(1'b1), .req, .match(match3), .in_matched(im3), .in_port(ip3));

  always #5 clk = ~clk;

  // model state: [0] for the one-iteration scheduler, [1] for three
  int gp [2][M];
  int ap [2][N];

  function automatic logic [N-1:0][M-1:0] model_match(input int s, input int iters,
                                                      input logic [N-1:0][M-1:0] r,
                                                      output int g_first [M],
                                                      output int a_first [N]);
    logic [N-1:0][M-1:0] m;
    bit in_free [N], out_free [M];
    int grant_of [M];
    m = '0;
    foreach (in_free[i]) in_free[i] = 1;
    foreach (out_free[j]) out_free[j] = 1;
    foreach (g_first[j]) g_first[j] = -1;
    foreach (a_first[i]) a_first[i] = -1;
    for (int it = 0; it < iters; it++) begin
      for (int j = 0; j < M; j++) begin
        grant_of[j] = -1;
        if (out_free[j])
          for (int k = 0; k < N; k++) begin
            int i = (gp[s][j] + k) % N;
            if (grant_of[j] < 0 && in_free[i] && r[i][j]) grant_of[j] = i;
          end
      end
      for (int i = 0; i < N; i++) begin
        int acc = -1;
        if (in_free[i])
          for (int k = 0; k < M; k++) begin
            int j = (ap[s][i] + k) % M;
            if (acc < 0 && grant_of[j] == i) acc = j;
          end
        if (acc >= 0) begin
          m[i][acc] = 1'b1;
          if (it == 0) begin a_first[i] = acc; g_first[acc] = i; end
        end
      end
      for (int i = 0; i < N; i++) if (|m[i]) in_free[i] = 0;
      for (int j = 0; j < M; j++) for (int i = 0; i < N; i++) if (m[i][j]) out_free[j] = 0;
    end
    return m;
  endfunction

  task automatic check_legal(input logic [N-1:0][M-1:0] m, input logic [N-1:0][M-1:0] r,
                             input logic [N-1:0] im, input logic [N-1:0][1:0] ip, input string tag);
    checks++;
    for (int i = 0; i < N; i++) begin
      if ($countones(m[i]) > 1 || (m[i] & ~r[i]) != 0 || im[i] != |m[i] ||
          (im[i] && !m[i][ip[i]])) begin
        failures++; $display("%s: illegal row %0d", tag, i);
      end
    end
    for (int j = 0; j < M; j++) begin
      int c = 0;
      for (int i = 0; i < N; i++) c += int'(m[i][j]);
      if (c > 1) begin failures++; $display("%s: output %0d matched twice", tag, j); end
    end
  endtask

  task automatic step_models();
    int g1 [M], a1 [N];
    logic [N-1:0][M-1:0] e1, e3;
    e1 = model_match(0, 1, req, g1, a1);
    checks++;
    if (e1 !== match1) begin failures++; $display("ITER=1: match %h expected %h", match1, e1); end
    for (int j = 0; j < M; j++) if (g1[j] >= 0) gp[0][j] = (g1[j] + 1) % N;
    for (int i = 0; i < N; i++) if (a1[i] >= 0) ap[0][i] = (a1[i] + 1) % M;
    e3 = model_match(1, 3, req, g1, a1);
    checks++;
    if (e3 !== match3) begin failures++; $display("ITER=3: match %h expected %h", match3, e3); end
    for (int j = 0; j < M; j++) if (g1[j] >= 0) gp[1][j] = (g1[j] + 1) % N;
    for (int i = 0; i < N; i++) if (a1[i] >= 0) ap[1][i] = (a1[i] + 1) % M;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int full_at;
    rst = 1; req = '0;
    foreach (gp[s, j]) gp[s][j] = 0;
    foreach (ap[s, i]) ap[s][i] = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    // random traffic
    for (int cyc = 0; cyc < 4000; cyc++) begin
      for (int i = 0; i < N; i++) req[i] = M'($urandom);
      #1;
      check_legal(match1, req, im1, ip1, "ITER=1");
      check_legal(match3, req, im3, ip3, "ITER=3");
      // maximality of three iterations on 4 x 4
      checks++;
      for (int i = 0; i < N; i++) for (int j = 0; j < M; j++)
        if (req[i][j] && !(|match3[i]) && !(|{match3[0][j], match3[1][j], match3[2][j], match3[3][j]})) begin
          failures++; $display("ITER=3: pair %0d-%0d left free", i, j);
        end
      step_models();
      @(posedge clk); #1;
    end
    // full load from reset: pointers must desynchronise
    rst = 1; @(posedge clk); #1 rst = 0;
    foreach (gp[s, j]) gp[s][j] = 0;
    foreach (ap[s, i]) ap[s][i] = 0;
    req = '1;
    full_at = -1;
    for (int cyc = 0; cyc < 12; cyc++) begin
      #1;
      if (full_at < 0 && im1 == '1) full_at = cyc;
      if (full_at >= 0) begin
        checks++;
        if (im1 != '1) begin failures++; $display("full load: cycle %0d not a full match", cyc); end
      end
      step_models();
      @(posedge clk); #1;
    end
    checks++;
    if (full_at < 0 || full_at > 3) begin
      failures++; $display("full load: full match first at cycle %0d", full_at);
    end else $display("full load: full match from cycle %0d", full_at);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
