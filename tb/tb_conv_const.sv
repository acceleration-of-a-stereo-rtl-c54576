// tb_conv_const -- self-checking test of conv_const at the full 96x96 size.
//
// The tile holds random 8-bit pixels. The engine runs twice, with the two
// gradient masks of the application ([-1 -1 -1; 0 0 0; 1 1 1] and
// [-1 0 1; -1 0 1; -1 0 1]), and then once with a random signed kernel so
// that every tap weight and the tap-to-H mapping are exercised. Each Y word
// is compared with a direct evaluation of the 3x3 sum with edge clamping.
// Also checked: done falls one cycle after start and rises 11*96*96 cycles
// after it, each output is written once, H reads never meet Y writes.
module tb_conv_const;

  localparam int N = 96;

  logic clk = 1'b0;
  logic rst;
  int   checks = 0, failures = 0;
  int   cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  logic        start, done;
  logic [31:0] h_q, u_q, y_din, h_din, u_din;
  logic [3:0]  h_addr;
  logic [13:0] u_addr, y_addr;
  logic        h_re, h_we, u_re, u_we, y_re, y_we;
  logic [31:0] umem [N*N];
  logic [31:0] hmem [16];
  logic [31:0] ymem [N*N];
  int          wcount [N*N];

  conv_const dut (
    .clk, .rst, .start, .done,
    .h_rsc_singleport_data_out(h_q), .h_rsc_singleport_addr(h_addr),
    .h_rsc_singleport_data_in(h_din), .h_rsc_singleport_re(h_re),
    .h_rsc_singleport_we(h_we),
    .u_rsc_singleport_data_out(u_q), .u_rsc_singleport_addr(u_addr),
    .u_rsc_singleport_data_in(u_din), .u_rsc_singleport_re(u_re),
    .u_rsc_singleport_we(u_we),
    .y_rsc_singleport_data_out(32'd0), .y_rsc_singleport_addr(y_addr),
    .y_rsc_singleport_data_in(y_din), .y_rsc_singleport_re(y_re),
    .y_rsc_singleport_we(y_we)
  );

  task automatic fail(input string msg);
    failures++;
    if (failures < 12) $display("FAIL: %s", msg);
  endtask

  always @(posedge clk) begin
    if (u_re) u_q <= umem[u_addr];
    if (h_re) h_q <= hmem[h_addr];
    if (y_we) begin
      ymem[y_addr] <= y_din;
      wcount[y_addr] <= wcount[y_addr] + 1;
    end
    if (!rst && h_re && y_we) fail("h read and y write in one cycle");
    if (!rst && (h_we || u_we || y_re)) fail("unused RAM strobe asserted");
  end

  function automatic int clampi(input int v);
    return (v < 0) ? 0 : (v > N - 1) ? N - 1 : v;
  endfunction

  task automatic run_and_check(input int kern [9], input string name);
    int c0;
    int want;
    for (int k = 0; k < 16; k++) hmem[k] = (k < 9) ? kern[k] : 32'h5555_5555;
    for (int n = 0; n < N*N; n++) begin ymem[n] = 32'hDEAD_BEEF; wcount[n] = 0; end
    @(negedge clk);
    checks++;
    if (done !== 1'b1) fail("done not high while idle");
    start = 1'b1;
    @(posedge clk); #1 c0 = cyc;
    @(negedge clk);
    checks++;
    if (done !== 1'b0) fail("done did not fall one cycle after start");
    start = 1'b0;
    while (!done) @(negedge clk);
    checks++;
    if (cyc - c0 != 11 * N * N) fail($sformatf("%s: %0d cycles, want %0d", name, cyc - c0, 11*N*N));
    for (int j = 0; j < N; j++)
      for (int i = 0; i < N; i++) begin
        want = 0;
        for (int b = -1; b <= 1; b++)
          for (int a = -1; a <= 1; a++)
            want += int'(umem[clampi(j+b)*N + clampi(i+a)]) * kern[3*(1-b) + (1-a)];
        checks++;
        if (int'(ymem[j*N+i]) != want || wcount[j*N+i] != 1)
          fail($sformatf("%s y[%0d,%0d]=%0d want %0d", name, i, j, int'(ymem[j*N+i]), want));
      end
  endtask

  initial begin
    int cv1 [9] = '{-1, -1, -1, 0, 0, 0, 1, 1, 1};
    int cv2 [9] = '{-1, 0, 1, -1, 0, 1, -1, 0, 1};
    int rk  [9];
    start = 1'b0;
    for (int n = 0; n < N*N; n++) umem[n] = 32'($urandom % 256);
    for (int k = 0; k < 9; k++) rk[k] = int'($urandom % 31) - 15;
    rst = 1'b1;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    run_and_check(cv1, "ConstantValue1");
    run_and_check(cv2, "ConstantValue2");
    run_and_check(rk, "random kernel");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
