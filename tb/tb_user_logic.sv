// tb_user_logic -- end-to-end test of the whole core at its default size.
//
// Plays the processor's part over the IPIF bus, with the memory and register
// map of the core, through one complete Harris-smoothing chain on a 96x96
// tile:
//   1. load the six ConvConst control arrays and read them back over the bus
//      and through the engine-side bs_* port;
//   2. ConvConst with the first gradient mask: load U (random pixels) at 0,
//      H at 30720, start via register 0, wait for done (register 4) to fall,
//      clear start, wait for done to rise, read Y from 16384;
//   3. square that result in software, load it as U of ConvRepl1 (32768) with
//      H at 63488 and start ConvRepl1, while ConvConst runs again with the
//      second gradient mask (two engines working at the same time);
//   4. move ConvRepl1's Y (49152) to ConvRepl2's U (65536), H at 96256, run
//      ConvRepl2 and read its Y from 81920.
// Every result word is compared with an independent reference. Mechanisms
// counted (each must occur): H reads and Y writes sharing a RAM port in each
// engine, overlapping engine runs, control-RAM accesses, register
// handshakes, and the busy time of every run (must equal 11 or 13 cycles per
// output word).
module tb_user_logic;
  import fp_ref_pkg::*;

  localparam int N  = 96;
  localparam int NN = N * N;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         rst;
  logic [0:31]  addr, wdata, rdata;
  logic [0:3]   be;
  logic [0:0]   cs;
  logic [0:7]   rdce, wrce;
  logic         rnw, err, rdack, wrack;
  logic         bs_re;
  logic [3:0]   bs_addr;
  logic [31:0]  bs_dout [6];

  user_logic dut (
    .Bus2IP_Clk(clk), .Bus2IP_Reset(rst), .Bus2IP_Addr(addr), .Bus2IP_BE(be),
    .Bus2IP_CS(cs), .Bus2IP_Data(wdata), .Bus2IP_RdCE(rdce), .Bus2IP_WrCE(wrce),
    .Bus2IP_RNW(rnw), .IP2Bus_Data(rdata), .IP2Bus_Error(err),
    .IP2Bus_RdAck(rdack), .IP2Bus_WrAck(wrack),
    .bs_re, .bs_addr, .bs_dout
  );

  // ---------------- mechanism counters (probing the engines' RAM ports) ---
  int n_hread [3], n_ywrite [3], n_overlap, n_bs_bus, n_bs_port, n_handshake;
  int busy [3];
  logic [2:0] eng_done;
  assign eng_done = {dut.g_repl[2].u_conv_repl.done, dut.g_repl[1].u_conv_repl.done,
                     dut.u_conv_const.done};
  always @(posedge clk) if (!rst) begin
    if (dut.g_mem[0].u_hy_mux.h_re) n_hread[0]++;
    if (dut.g_mem[1].u_hy_mux.h_re) n_hread[1]++;
    if (dut.g_mem[2].u_hy_mux.h_re) n_hread[2]++;
    if (dut.g_mem[0].u_hy_mux.y_we) n_ywrite[0]++;
    if (dut.g_mem[1].u_hy_mux.y_we) n_ywrite[1]++;
    if (dut.g_mem[2].u_hy_mux.y_we) n_ywrite[2]++;
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

  // ---------------- bus master tasks --------------------------------------
  task automatic bus_write(input int a, input logic [31:0] d);
    @(negedge clk);
    addr = 32'(a); wdata = d; rnw = 1'b0; cs = 1'b1;
    #1 if (!wrack) begin failures++; $display("FAIL no write ack at %0d", a); end
    @(negedge clk);
    cs = 1'b0; rnw = 1'b1;
  endtask

  task automatic bus_read(input int a, output logic [31:0] d);
    @(negedge clk);
    addr = 32'(a); rnw = 1'b1; cs = 1'b1;
    @(negedge clk);
    if (!rdack) begin failures++; $display("FAIL no read ack at %0d", a); end
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
    if (!rdack) begin failures++; $display("FAIL no register ack"); end
    @(negedge clk);
    rdce = '0;
  endtask

  // setone / getone style start-done handshake, split in two halves
  task automatic engine_start(input int e);
    logic [31:0] v;
    reg_write(e, 32'd1);
    do reg_read(4 + e, v); while (v[0] != 1'b0);
    reg_write(e, 32'd0);
    n_handshake++;
  endtask

  task automatic engine_wait(input int e);
    logic [31:0] v;
    do reg_read(4 + e, v); while (v[0] != 1'b1);
  endtask

  // ---------------- data and references ------------------------------------
  logic [31:0] pix [NN];
  logic [31:0] yc1 [NN], yc2 [NN], u1 [NN], yr1 [NN], yr2 [NN];
  logic [31:0] h3 [11], h4 [11];
  int          cv1 [9] = '{-1, -1, -1, 0, 0, 0, 1, 1, 1};
  int          cv2 [9] = '{-1, 0, 1, -1, 0, 1, -1, 0, 1};
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

  function automatic int ref_const(input int i, input int j, input int k [9]);
    int s = 0;
    for (int b = -1; b <= 1; b++)
      for (int a = -1; a <= 1; a++)
        s += int'(pix[clampi(j+b)*N + clampi(i+a)]) * k[3*(1-b) + (1-a)];
    return s;
  endfunction

  function automatic logic [31:0] ref_repl(input logic [31:0] u [NN], input logic [31:0] h [11],
                                           input int i, input int j, input bit vert);
    logic [31:0] acc = 32'd0;
    for (int k = 0; k < 11; k++) begin
      int x = clampi((vert ? j : i) + k - 5);
      acc = fadd(fmul(u[vert ? x*N + i : j*N + x], h[10-k]), (k == 0) ? 32'd0 : acc);
    end
    return acc;
  endfunction

  int busy0;

  initial begin
    logic [31:0] v;
    logic [31:0] bsv [6][16];
    int bs_base [6] = '{25600, 26624, 27648, 28672, 29696, 31744};
    int bs_len  [6] = '{16, 16, 16, 16, 8, 8};

    rst = 1; cs = 0; rnw = 1; rdce = 0; wrce = 0; addr = 0; wdata = 0; be = 4'hF;
    bs_re = 0; bs_addr = 0;
    for (int n = 0; n < NN; n++) pix[n] = 32'($urandom % 256);
    for (int k = 0; k < 11; k++) begin h3[k] = r2f(h3r[k]); h4[k] = r2f(h4r[k]); end
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;

    // 1. control arrays
    for (int s = 0; s < 6; s++)
      for (int w = 0; w < bs_len[s]; w++) begin
        bsv[s][w] = $urandom;
        bus_write(bs_base[s] + w, bsv[s][w]);
        n_bs_bus++;
      end
    for (int s = 0; s < 6; s++)
      for (int w = 0; w < bs_len[s]; w++) begin
        bus_read(bs_base[s] + w, v);
        expect_eq(v, bsv[s][w], "control RAM bus read-back");
      end
    for (int w = 0; w < 16; w++) begin
      @(negedge clk); bs_re = 1; bs_addr = 4'(w);
      @(negedge clk); bs_re = 0;
      for (int s = 0; s < 6; s++)
        if (w < bs_len[s]) begin
          expect_eq(bs_dout[s], bsv[s][w], "control RAM engine port");
          n_bs_port++;
        end
    end

    // registers idle state
    for (int e = 0; e < 3; e++) begin
      reg_read(4 + e, v);
      expect_eq(v, 32'd1, "done high while idle");
    end

    // 2. ConvConst, first mask
    for (int n = 0; n < NN; n++) bus_write(n, pix[n]);
    for (int k = 0; k < 9; k++) bus_write(30720 + k, cv1[k]);
    busy0 = busy[0];
    engine_start(0);
    engine_wait(0);
    expect_eq(busy[0] - busy0, 11 * NN, "ConvConst busy cycles");
    for (int n = 0; n < NN; n++) begin
      bus_read(16384 + n, yc1[n]);
      expect_eq(yc1[n], ref_const(n % N, n / N, cv1), "ConvConst Y (mask 1)");
    end

    // 3. ConvRepl1 on Y1^2, ConvConst with the second mask at the same time
    for (int n = 0; n < NN; n++) begin
      u1[n] = r2f(real'(int'(yc1[n])) * real'(int'(yc1[n])));
      bus_write(32768 + n, u1[n]);
    end
    for (int k = 0; k < 11; k++) bus_write(63488 + k, h3[k]);
    for (int k = 0; k < 9; k++) bus_write(30720 + k, cv2[k]);
    engine_start(1);
    engine_start(0);
    engine_wait(0);
    engine_wait(1);
    for (int n = 0; n < NN; n++) begin
      bus_read(16384 + n, yc2[n]);
      expect_eq(yc2[n], ref_const(n % N, n / N, cv2), "ConvConst Y (mask 2)");
    end
    for (int n = 0; n < NN; n++) begin
      bus_read(49152 + n, yr1[n]);
      expect_eq(yr1[n], ref_repl(u1, h3, n % N, n / N, 1'b0), "ConvRepl1 Y");
    end

    // 4. ConvRepl2 on ConvRepl1's output
    for (int n = 0; n < NN; n++) bus_write(65536 + n, yr1[n]);
    for (int k = 0; k < 11; k++) bus_write(96256 + k, h4[k]);
    busy0 = busy[2];
    engine_start(2);
    engine_wait(2);
    expect_eq(busy[2] - busy0, 13 * NN, "ConvRepl2 busy cycles");
    for (int n = 0; n < NN; n++) begin
      bus_read(81920 + n, yr2[n]);
      expect_eq(yr2[n], ref_repl(yr1, h4, n % N, n / N, 1'b1), "ConvRepl2 Y");
    end
    expect_eq(busy[1], 13 * NN, "ConvRepl1 busy cycles");
    expect_eq(32'(err), 0, "IP2Bus_Error");

    // mechanisms
    $display("H reads / Y writes per engine: %0d/%0d %0d/%0d %0d/%0d",
             n_hread[0], n_ywrite[0], n_hread[1], n_ywrite[1], n_hread[2], n_ywrite[2]);
    $display("overlapping engine cycles %0d, control RAM bus writes %0d, engine-port reads %0d, handshakes %0d",
             n_overlap, n_bs_bus, n_bs_port, n_handshake);
    expect_eq(n_hread[0], 2 * 9 * NN, "ConvConst H reads on the shared port");
    expect_eq(n_ywrite[0], 2 * NN, "ConvConst Y writes on the shared port");
    for (int e = 1; e < 3; e++) begin
      expect_eq(n_hread[e], 11 * NN, "ConvRepl H reads on the shared port");
      expect_eq(n_ywrite[e], NN, "ConvRepl Y writes on the shared port");
    end
    checks++; if (n_overlap == 0)  begin failures++; $display("FAIL engines never overlapped"); end
    checks++; if (n_bs_bus == 0 || n_bs_port == 0) begin failures++; $display("FAIL no control RAM access"); end
    checks++; if (n_handshake != 4) begin failures++; $display("FAIL handshake count %0d", n_handshake); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
