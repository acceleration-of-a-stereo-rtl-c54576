// tb_conv_repl -- self-checking test of conv_repl in both directions.
//
// Two engines run side by side at the full 96x96 size: VERTICAL = 0
// (ConvRepl1, rows) and VERTICAL = 1 (ConvRepl2, columns), each with its own
// RAM models of one-cycle read latency. U holds random single-precision
// values of the magnitude the Harris detector produces (up to about 6e5);
// H is the 11-tap smoothing vector of the application. Every Y word is
// compared with a reference computed tap by tap with the same rounding order
// (fp_ref_pkg). Also checked: done is 1 after reset, falls one cycle after
// start, and rises exactly 13*96*96 cycles after start; no output is written
// twice and H reads never coincide with Y writes.
module tb_conv_repl;
  import fp_ref_pkg::*;

  localparam int N    = 96;
  localparam int TAPS = 11;

  logic clk = 1'b0;
  logic rst;
  int   checks = 0, failures = 0;
  int   cyc = 0;
  bit   fin [2];

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic fail(input string msg);
    failures++;
    if (failures < 12) $display("FAIL: %s", msg);
  endtask

  // 11-tap vectors as printed for ConvRepl1 and ConvRepl2
  function automatic real hval(input int g, input int k);
    real h1 [TAPS] = '{-3.548294306e-2, -5.850147083e-2, -8.630958945e-2,
                       -1.139453053e-1, -1.346104741e-1, -1.423004717e-1,
                       -1.346104741e-1, -1.139453053e-1, -8.630958945e-2,
                       -5.850147083e-2, -3.548293561e-2};
    real h2 [TAPS] = '{-3.548293561e-2, -5.850147083e-2, -8.630958945e-2,
                       -1.139453053e-1, -1.346104741e-1, -1.423004419e-1,
                       -1.346104741e-1, -1.139453053e-1, -8.630958945e-2,
                       -5.850147456e-2, -3.548293188e-2};
    return (g == 0) ? h1[k] : h2[k];
  endfunction

  for (genvar g = 0; g < 2; g++) begin : g_dut
    logic        start, done;
    logic [31:0] h_q, u_q, y_din, h_din, u_din;
    logic [3:0]  h_addr;
    logic [13:0] u_addr, y_addr;
    logic        h_re, h_we, u_re, u_we, y_re, y_we;
    logic [31:0] umem [N*N];
    logic [31:0] hmem [16];
    logic [31:0] ymem [N*N];
    int          wcount [N*N];

    conv_repl #(.VERTICAL(g == 1)) dut (
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

    initial begin
      int c0, x, idx;
      logic [31:0] acc, want;
      start = 1'b0;
      for (int n = 0; n < N*N; n++) begin
        umem[n]   = r2f(real'(int'($urandom % 2400001) - 1200000) / 4.0);
        ymem[n]   = 32'hDEAD_BEEF;
        wcount[n] = 0;
      end
      for (int k = 0; k < 16; k++) hmem[k] = (k < TAPS) ? r2f(hval(g, k)) : 32'h7F80_0001;
      @(negedge clk);
      while (rst) @(negedge clk);
      checks++;
      if (done !== 1'b1) fail("done not high after reset");
      start = 1'b1;
      @(posedge clk); #1 c0 = cyc;
      @(negedge clk);
      checks++;
      if (done !== 1'b0) fail("done did not fall one cycle after start");
      start = 1'b0;
      while (!done) @(negedge clk);
      checks++;
      if (cyc - c0 != 13 * N * N) fail($sformatf("engine %0d took %0d cycles, want %0d", g, cyc - c0, 13*N*N));
      for (int j = 0; j < N; j++)
        for (int i = 0; i < N; i++) begin
          acc = 32'd0;
          for (int k = 0; k < TAPS; k++) begin
            x = (g == 0 ? i : j) + k - 5;
            if (x < 0) x = 0;
            if (x > N - 1) x = N - 1;
            idx = (g == 0) ? j*N + x : x*N + i;
            acc = fadd(fmul(umem[idx], hmem[TAPS-1-k]), (k == 0) ? 32'd0 : acc);
          end
          want = acc;
          checks++;
          if (ymem[j*N+i] !== want || wcount[j*N+i] != 1)
            fail($sformatf("engine %0d y[%0d,%0d]=%h want %h (writes %0d)", g, i, j,
                           ymem[j*N+i], want, wcount[j*N+i]));
        end
      fin[g] = 1'b1;
    end
  end

  initial begin
    rst = 1'b1;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    wait (fin[0] && fin[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
