// tb_plb_slave_if -- self-checking test of the bus-side decoder and registers.
//
// Checks, against the memory and register map of the core:
//  * each large RAM enable follows Bus2IP_CS AND address bits 16..14;
//  * each small control-RAM enable follows Bus2IP_CS AND bits 16..10;
//  * word address, write data and write strobe reach the RAM port;
//  * a memory read is acknowledged one cycle later with the data of the
//    selected RAM (small RAM when hit), a write in the same cycle;
//  * registers 0..2 drive start, register 3 drives nothing, registers
//    4..6 read back done, the others read 0; IP2Bus_Error stays 0.
module tb_plb_slave_if;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         rst;
  logic [0:31]  addr, wdata, rdata;
  logic [0:3]   be;
  logic [0:0]   cs;
  logic [0:7]   rdce, wrce;
  logic         rnw, err, rdack, wrack;
  logic [2:0]   start, done;
  logic [13:0]  ram_addr;
  logic [31:0]  ram_din;
  logic         ram_wr;
  logic [5:0]   big_en, small_en;
  logic [31:0]  big_dout [6];
  logic [31:0]  small_dout [6];

  plb_slave_if dut (
    .Bus2IP_Clk(clk), .Bus2IP_Reset(rst), .Bus2IP_Addr(addr), .Bus2IP_BE(be),
    .Bus2IP_CS(cs), .Bus2IP_Data(wdata), .Bus2IP_RdCE(rdce), .Bus2IP_WrCE(wrce),
    .Bus2IP_RNW(rnw), .IP2Bus_Data(rdata), .IP2Bus_Error(err),
    .IP2Bus_RdAck(rdack), .IP2Bus_WrAck(wrack),
    .start, .done, .ram_addr, .ram_din, .ram_wr, .big_en, .small_en,
    .big_dout, .small_dout
  );

  localparam logic [6:0] SMALL_CODE [6] = '{7'd25, 7'd26, 7'd27, 7'd28, 7'd29, 7'd31};

  task automatic expect_eq(input logic [31:0] got, input logic [31:0] want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 12) $display("FAIL %s: got %h want %h", what, got, want);
    end
  endtask

  function automatic logic [5:0] want_small(input logic [16:0] a);
    for (int s = 0; s < 6; s++) want_small[s] = (a[16:10] == SMALL_CODE[s]);
  endfunction

  initial begin
    rst = 1; cs = 0; rnw = 1; rdce = 0; wrce = 0; addr = 0; wdata = 0; be = 4'hF; done = 3'b101;
    for (int r = 0; r < 6; r++) begin big_dout[r] = 32'h1000_0000 * (r + 1); small_dout[r] = 32'hA0 + r; end
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    expect_eq(32'(start), 0, "start after reset");

    // memory decode, reads and writes
    for (int n = 0; n < 3000; n++) begin
      logic [16:0] wa;
      logic [31:0] want;
      int          sel;
      @(negedge clk);
      wa = (n % 3 == 0) ? {7'(SMALL_CODE[$urandom % 6]), 10'($urandom)} : 17'($urandom % 98304);
      addr = {15'($urandom), wa};
      cs = 1'($urandom % 8 != 0);
      rnw = 1'($urandom);
      wdata = $urandom;
      #1;
      for (int r = 0; r < 6; r++)
        expect_eq(32'(big_en[r]), 32'(cs[0] && wa[16:14] == 3'(r)), "big enable");
      expect_eq(32'(small_en), 32'(cs[0] ? want_small(wa) : 6'd0), "small enable");
      expect_eq(32'(ram_addr), 32'(wa[13:0]), "ram address");
      expect_eq(ram_din, wdata, "ram data");
      expect_eq(32'(ram_wr), 32'(!rnw), "ram write");
      expect_eq(32'(wrack), 32'(cs[0] && !rnw), "write ack");
      expect_eq(32'(rdack), 0, "no read ack in first cycle");
      if (cs[0] && rnw) begin
        sel = 0;
        for (int s = 0; s < 6; s++) if (want_small(wa)[s]) sel = s + 1;
        want = (sel != 0) ? small_dout[sel-1] : big_dout[wa[16:14]];
        @(posedge clk); #1;
        expect_eq(32'(rdack), 1, "read ack in second cycle");
        expect_eq(rdata, want, "read data");
        @(negedge clk); cs = 0;
        @(posedge clk); #1 expect_eq(32'(rdack), 0, "read ack once");
      end
    end
    @(negedge clk); cs = 0;

    // registers
    for (int k = 0; k < 4; k++) begin
      @(negedge clk); wrce = 8'h80 >> k; wdata = 32'h1;
      #1 expect_eq(32'(wrack), 1, "reg write ack");
      @(negedge clk); wrce = 0;
      expect_eq(32'(start), (k < 3) ? (32'd1 << (k + 1)) - 1 : 32'd7, "start bits");
    end
    @(negedge clk); wrce = 8'h40; wdata = 32'h0;        // clear start of ConvRepl1
    @(negedge clk); wrce = 0;
    expect_eq(32'(start), 32'b101, "start after clear");
    for (int t = 0; t < 4; t++) begin
      done = 3'($urandom);
      for (int k = 0; k < 8; k++) begin
        @(negedge clk); rdce = 8'h80 >> k;
        #1;
        expect_eq(32'(rdack), 1, "reg read ack");
        expect_eq(rdata, (k >= 4 && k <= 6) ? 32'(done[k-4]) : 32'd0, "reg read data");
      end
      @(negedge clk); rdce = 0;
    end
    expect_eq(32'(err), 0, "error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
