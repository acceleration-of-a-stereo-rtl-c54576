// tb_hy_port_mux -- self-checking test of the H/Y port sharing logic.
//
// Drives random engine requests (H read, Y write or idle, never both) and
// checks the RAM port: an H read must appear at word 14336 + h_addr
// (binary 111 0000000 hhhh) with the port enabled and not writing; a Y write
// must pass its address and data through and write; idle leaves the port
// disabled; read data is returned to the engine unchanged.
module tb_hy_port_mux;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0]  h_addr;
  logic        h_re, y_we, ram_en, ram_wr;
  logic [13:0] y_addr, ram_addr;
  logic [31:0] y_data_in, h_data_out, ram_din, ram_dout;

  hy_port_mux dut (.clk, .h_addr, .h_re, .y_addr, .y_data_in, .y_we, .h_data_out,
                   .ram_en, .ram_wr, .ram_addr, .ram_din, .ram_dout);

  task automatic expect_eq(input logic [31:0] got, input logic [31:0] want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h want %h", what, got, want);
    end
  endtask

  initial begin
    h_re = 0; y_we = 0; h_addr = 0; y_addr = 0; y_data_in = 0; ram_dout = 0;
    for (int n = 0; n < 3000; n++) begin
      int mode;
      @(negedge clk);
      mode = int'($urandom % 3);
      h_re = (mode == 1); y_we = (mode == 2);
      h_addr = 4'($urandom); y_addr = 14'($urandom); y_data_in = $urandom; ram_dout = $urandom;
      #1;
      expect_eq(32'(ram_en), 32'(mode != 0), "ram_en");
      expect_eq(32'(ram_wr), 32'(mode == 2), "ram_wr");
      if (mode == 1) expect_eq(32'(ram_addr), 32'(14336 + h_addr), "h address");
      if (mode == 2) begin
        expect_eq(32'(ram_addr), 32'(y_addr), "y address");
        expect_eq(ram_din, y_data_in, "y data");
      end
      expect_eq(h_data_out, ram_dout, "read data");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
