// tb_dpram -- self-checking test of the dual-port RAM at its full 16K depth.
//
// Random traffic on both ports at once against a reference array: writes,
// reads (data expected one cycle later), read-during-write on the same port
// (old data), idle cycles with EN low (output must hold), and both ports
// writing one word in the same cycle (port 2 wins).
module tb_dpram;
  localparam int AW = 14;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          en1, wr1, en2, wr2;
  logic [AW-1:0] addr1, addr2;
  logic [31:0]   din1, din2, dout1, dout2;
  logic [31:0]   model [2**AW];
  logic [31:0]   exp1, exp2;
  bit            chk1, chk2;

  dpram #(.AW(AW)) dut (.clk, .en1, .wr1, .addr1, .din1, .dout1,
                        .en2, .wr2, .addr2, .din2, .dout2);

  task automatic cmp(input logic [31:0] got, input logic [31:0] want, input string p);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h want %h", p, got, want);
    end
  endtask

  initial begin
    en1 = 0; en2 = 0; wr1 = 0; wr2 = 0; addr1 = 0; addr2 = 0; din1 = 0; din2 = 0;
    // fill through both ports
    for (int a = 0; a < 2**AW; a += 2) begin
      @(negedge clk);
      en1 = 1; wr1 = 1; addr1 = AW'(a);     din1 = $urandom; model[a]   = din1;
      en2 = 1; wr2 = 1; addr2 = AW'(a + 1); din2 = $urandom; model[a+1] = din2;
    end
    @(negedge clk); en1 = 0; en2 = 0; wr1 = 0; wr2 = 0;
    for (int n = 0; n < 40000; n++) begin
      @(negedge clk);
      en1 = 1'($urandom); wr1 = 1'($urandom); addr1 = AW'($urandom); din1 = $urandom;
      en2 = 1'($urandom); wr2 = 1'($urandom); addr2 = AW'($urandom); din2 = $urandom;
      if (n % 97 == 0) begin addr2 = addr1; en1 = 1; en2 = 1; wr1 = 1; wr2 = 1; end
      chk1 = en1; chk2 = en2;
      if (en1) exp1 = model[addr1];
      if (en2) exp2 = model[addr2];
      if (en1 && wr1) model[addr1] = din1;
      if (en2 && wr2) model[addr2] = din2;     // port 2 wins a clash
      @(posedge clk); #1;
      cmp(dout1, exp1, "port1");
      cmp(dout2, exp2, "port2");
    end
    // final read-back of everything through port 1
    en2 = 0;
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk); en1 = 1; wr1 = 0; addr1 = AW'(a);
      @(posedge clk); #1;
      cmp(dout1, model[a], "readback");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
