// tb_harris_tile -- workload test: the complete per-tile smoothing step of a
// Harris corner detector, run on the core at its default size.
//
// One 96x96 tile of 8-bit pixels goes through all eight engine calls that the
// application makes per tile:
//   ConvConst with gradient mask 1 -> Y1 and with gradient mask 2 -> Y2;
//   software forms Y1*Y1, Y1*Y2 and Y2*Y2 as single-precision words;
//   each of the three products goes through ConvRepl1 (rows) and then
//   ConvRepl2 (columns).
// The processor side follows the overlapped calling order in which
// independent calls run at the same time:
//   phase 1  ConvConst(mask 1)
//   phase 2  ConvConst(mask 2)  || ConvRepl1(Y1*Y1)
//   phase 3  ConvRepl1(Y1*Y2)   || ConvRepl2(first row result)
//   phase 4  ConvRepl1(Y2*Y2)   || ConvRepl2(second row result)
//   phase 5  ConvRepl2(third row result)
// Every word read back is compared with an independent reference (integer
// arithmetic for ConvConst, single precision rounded to nearest even for the
// two float engines). The busy time of each engine must be 11 (ConvConst) or
// 13 (ConvRepl) cycles per output word, the engines must overlap in phases 2
// to 4, and the total number of bus-visible clock cycles is printed.
module tb_harris_tile;
  import fp_ref_pkg::*;

  localparam int N  = 96;
  localparam int NN = N * N;

  // word addresses of the bus map
  localparam int A_U  [3] = '{0, 32768, 65536};
  localparam int A_Y  [3] = '{16384, 49152, 81920};
  localparam int A_H  [3] = '{30720, 63488, 96256};

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         rst;
  logic [0:31]  addr, wdata, rdata;
  logic [0:3]   be;
  logic [0:0]   cs;
  logic [0:7]   rdce, wrce;
  logic         rnw, err, rdack, wrack;
  logic [31:0]  bs_dout [6];

  user_logic dut (
    .Bus2IP_Clk(clk), .Bus2IP_Reset(rst), .Bus2IP_Addr(addr), .Bus2IP_BE(be),
    .Bus2IP_CS(cs), .Bus2IP_Data(wdata), .Bus2IP_RdCE(rdce), .Bus2IP_WrCE(wrce),
    .Bus2IP_RNW(rnw), .IP2Bus_Data(rdata), .IP2Bus_Error(err),
    .IP2Bus_RdAck(rdack), .IP2Bus_WrAck(wrack),
    .bs_re(1'b0), .bs_addr(4'd0), .bs_dout
  );

  // ---------------- busy / overlap counters --------------------------------
  int busy [3], n_overlap, cycles;
  logic [2:0] eng_done;
  assign eng_done = {dut.g_repl[2].u_conv_repl.done, dut.g_repl[1].u_conv_repl.done,
                     dut.u_conv_const.done};
  always @(posedge clk) if (!rst) begin
    cycles++;
    if ($countones(~eng_done) >= 2) n_overlap++;
    for (int e = 0; e < 3; e++) if (!eng_done[e]) busy[e]++;
  end

  task automatic expect_eq(input logic [31:0] got, input logic [31:0] want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 12) $display("FAIL %s: got %h want %h", what, got, want);
    end
  endtask

  // ---------------- bus master ----------------------------------------------
  task automatic bus_write(input int a, input logic [31:0] d);
    @(negedge clk);
    addr = 32'(a); wdata = d; rnw = 1'b0; cs = 1'b1;
    @(negedge clk);
    cs = 1'b0; rnw = 1'b1;
  endtask

  task automatic bus_read(input int a, output logic [31:0] d);
    @(negedge clk);
    addr = 32'(a); rnw = 1'b1; cs = 1'b1;
    @(negedge clk);
    d = rdata;
    cs = 1'b0;
  endtask

  task automatic reg_write(input int r, input logic [31:0] d);
    @(negedge clk);
    wrce = 8'h80 >> r; wdata = d;
    @(negedge clk);
    wrce = '0;
  endtask

  task automatic reg_read(input int r, output logic [31:0] d);
    @(negedge clk);
    rdce = 8'h80 >> r;
    #1 d = rdata;
    @(negedge clk);
    rdce = '0;
  endtask

  task automatic engine_start(input int e);
    logic [31:0] v;
    reg_write(e, 32'd1);
    do reg_read(4 + e, v); while (v[0] != 1'b0);
    reg_write(e, 32'd0);
  endtask

  task automatic engine_wait(input int e);
    logic [31:0] v;
    do reg_read(4 + e, v); while (v[0] != 1'b1);
  endtask

  task automatic put_tile(input int base, input int id);
    for (int n = 0; n < NN; n++) bus_write(base + n, mat[id][n]);
  endtask

  task automatic get_tile(input int base, input int id);
    for (int n = 0; n < NN; n++) bus_read(base + n, mat[id][n]);
  endtask

  // ---------------- references ---------------------------------------------
  // matrix store: PIX pixels, Y1/Y2 ConvConst results, P0..P2 the three
  // products, R1_0.. row results, R2_0.. final results (all read back)
  localparam int PIX = 0, Y1 = 1, Y2 = 2, P0 = 3, R1_0 = 6, R2_0 = 9;
  logic [31:0] mat [12][NN];
  logic [31:0] h3 [11], h4 [11];
  int          cv [2][9] = '{'{-1, -1, -1, 0, 0, 0, 1, 1, 1},
                             '{-1, 0, 1, -1, 0, 1, -1, 0, 1}};
  real         h3r [11] = '{-3.548294306e-2, -5.850147083e-2, -8.630958945e-2,
                            -1.139453053e-1, -1.346104741e-1, -1.423004717e-1,
                            -1.346104741e-1, -1.139453053e-1, -8.630958945e-2,
                            -5.850147083e-2, -3.548293561e-2};
  real         h4r [11] = '{-3.548293561e-2, -5.850147083e-2, -8.630958945e-2,
                            -1.139453053e-1, -1.346104741e-1, -1.423004419e-1,
                            -1.346104741e-1, -1.139453053e-1, -8.630958945e-2,
                            -5.850147456e-2, -3.548293188e-2};

  function automatic int clampi(input int v);
    return (v < 0) ? 0 : (v > N - 1) ? N - 1 : v;
  endfunction

  function automatic int ref_const(input int i, input int j, input int m);
    int s = 0;
    for (int b = -1; b <= 1; b++)
      for (int a = -1; a <= 1; a++)
        s += int'(mat[PIX][clampi(j+b)*N + clampi(i+a)]) * cv[m][3*(1-b) + (1-a)];
    return s;
  endfunction

  function automatic logic [31:0] ref_repl(input int u, input int i, input int j, input bit vert);
    logic [31:0] acc = 32'd0;
    for (int k = 0; k < 11; k++) begin
      int x = clampi((vert ? j : i) + k - 5);
      acc = fadd(fmul(mat[u][vert ? x*N + i : j*N + x], vert ? h4[10-k] : h3[10-k]),
                 (k == 0) ? 32'd0 : acc);
    end
    return acc;
  endfunction

  task automatic check_const(input int y, input int m);
    for (int n = 0; n < NN; n++)
      expect_eq(mat[y][n], ref_const(n % N, n / N, m), "ConvConst Y");
  endtask

  task automatic check_repl(input int u, input int y, input bit vert);
    for (int n = 0; n < NN; n++)
      expect_eq(mat[y][n], ref_repl(u, n % N, n / N, vert),
                vert ? "ConvRepl2 Y" : "ConvRepl1 Y");
  endtask

  function automatic logic [31:0] prod(input int a, input int b, input int n);
    return r2f(real'(int'(mat[a][n])) * real'(int'(mat[b][n])));
  endfunction

  int ov [6];

  initial begin
    rst = 1; cs = 0; rnw = 1; rdce = 0; wrce = 0; addr = 0; wdata = 0; be = 4'hF;
    for (int n = 0; n < NN; n++) mat[PIX][n] = 32'($urandom % 256);
    for (int k = 0; k < 11; k++) begin h3[k] = r2f(h3r[k]); h4[k] = r2f(h4r[k]); end
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;

    // constants of the two float engines are written once per tile
    for (int k = 0; k < 11; k++) bus_write(A_H[1] + k, h3[k]);
    for (int k = 0; k < 11; k++) bus_write(A_H[2] + k, h4[k]);

    // phase 1: ConvConst, mask 1
    put_tile(A_U[0], PIX);
    for (int k = 0; k < 9; k++) bus_write(A_H[0] + k, cv[0][k]);
    engine_start(0); engine_wait(0);
    get_tile(A_Y[0], Y1);
    check_const(Y1, 0);
    for (int n = 0; n < NN; n++) mat[P0][n] = prod(Y1, Y1, n);
    ov[0] = n_overlap;

    // phase 2: ConvConst mask 2 || ConvRepl1(Y1*Y1)
    for (int k = 0; k < 9; k++) bus_write(A_H[0] + k, cv[1][k]);
    put_tile(A_U[1], P0);
    engine_start(0); engine_start(1);
    engine_wait(0); engine_wait(1);
    get_tile(A_Y[0], Y2);
    get_tile(A_Y[1], R1_0);
    check_const(Y2, 1);
    check_repl(P0, R1_0, 1'b0);
    for (int n = 0; n < NN; n++) begin
      mat[P0+1][n] = prod(Y1, Y2, n);
      mat[P0+2][n] = prod(Y2, Y2, n);
    end
    ov[1] = n_overlap;

    // phases 3 and 4: ConvRepl1(next product) || ConvRepl2(previous row result)
    for (int q = 1; q < 3; q++) begin
      put_tile(A_U[1], P0 + q);
      put_tile(A_U[2], R1_0 + q - 1);
      engine_start(1); engine_start(2);
      engine_wait(1); engine_wait(2);
      get_tile(A_Y[1], R1_0 + q);
      get_tile(A_Y[2], R2_0 + q - 1);
      check_repl(P0 + q, R1_0 + q, 1'b0);
      check_repl(R1_0 + q - 1, R2_0 + q - 1, 1'b1);
      ov[q+1] = n_overlap;
    end

    // phase 5: ConvRepl2 on the last row result
    put_tile(A_U[2], R1_0 + 2);
    engine_start(2); engine_wait(2);
    get_tile(A_Y[2], R2_0 + 2);
    check_repl(R1_0 + 2, R2_0 + 2, 1'b1);
    ov[4] = n_overlap;

    expect_eq(busy[0], 2 * 11 * NN, "ConvConst busy cycles");
    expect_eq(busy[1], 3 * 13 * NN, "ConvRepl1 busy cycles");
    expect_eq(busy[2], 3 * 13 * NN, "ConvRepl2 busy cycles");
    for (int ph = 1; ph < 4; ph++) begin
      checks++;
      if (ov[ph] == ov[ph-1]) begin
        failures++; $display("FAIL no engine overlap in phase %0d", ph + 1);
      end
    end
    checks++;
    if (ov[4] != ov[3]) begin failures++; $display("FAIL overlap in phase 5"); end
    expect_eq(32'(err), 0, "IP2Bus_Error");

    $display("tile step: %0d clock cycles in all, engine busy %0d/%0d/%0d, overlapped %0d",
             cycles, busy[0], busy[1], busy[2], n_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
