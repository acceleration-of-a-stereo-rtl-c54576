// conv_const -- ConvConst: 3x3 integer convolution of an image tile.
//
// Convolves a TILE_N x TILE_N tile of 8-bit grey values U (held as 32-bit
// integers) with a 3x3 kernel H (the gradient masks [-1 -1 -1; 0 0 0; 1 1 1]
// or [-1 0 1; -1 0 1; -1 0 1], supplied by software as nine 32-bit integers,
// row-major) and writes the 32-bit integer matrix Y:
//   y[i,j] = sum_{b=-1..1} sum_{a=-1..1} u[i+a, j+b] * h[1-a, 1-b]
// where u[i,j] is column i, row j (word j*TILE_N+i) and h[c,r] is word 3*r+c,
// so tap t = 3*(b+1)+(a+1) reads h word 8-t. Taps are taken in that order.
// Integer arithmetic follows the original design, whose ConvConst was
// changed from floating point to int because both the pixels and the kernel
// are integers. Products and sums wrap at 32 bits.
//
// Borders: the original handles the outer margins with six control arrays
// (bSStart, bSEnd, bSPreEdges, bSPostEdges, bSNumPreEdges, bSNumPostEdges)
// whose meaning is not available. This engine instead clamps an index that
// falls outside the tile to the nearest edge, and does not read those arrays.
//
// Interface and handshake are those of conv_repl (the original engine's
// u/h/y single-port RAM ports, clk, rst, start, done; unused ports held at 0;
// h_re and y_we never together, since H and Y share a RAM). Schedule (this
// design's own): 9 read cycles, one add cycle and one write cycle per output
// word, 11*TILE_N*TILE_N cycles from start to done.
module conv_const
  import conv_pkg::*;
#(
  parameter int unsigned N = TILE_N
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                start,
  output logic                done,

  input  logic [31:0]         h_rsc_singleport_data_out,
  output logic [3:0]          h_rsc_singleport_addr,
  output logic [31:0]         h_rsc_singleport_data_in,
  output logic                h_rsc_singleport_re,
  output logic                h_rsc_singleport_we,

  input  logic [31:0]         u_rsc_singleport_data_out,
  output logic [RAM_AW-1:0]   u_rsc_singleport_addr,
  output logic [31:0]         u_rsc_singleport_data_in,
  output logic                u_rsc_singleport_re,
  output logic                u_rsc_singleport_we,

  input  logic [31:0]         y_rsc_singleport_data_out,
  output logic [RAM_AW-1:0]   y_rsc_singleport_addr,
  output logic [31:0]         y_rsc_singleport_data_in,
  output logic                y_rsc_singleport_re,
  output logic                y_rsc_singleport_we
);

  localparam int unsigned TAPS = 9;

  typedef enum logic [1:0] {S_IDLE, S_READ, S_LAST, S_WRITE} state_e;

  state_e      state;
  logic [6:0]  col, row;
  logic [1:0]  ta, tb;            // tap column / row offset + 1
  logic [3:0]  tap;
  logic        rd_valid, rd_first;
  logic [31:0] acc;
  logic [6:0]  u_col, u_row;

  function automatic logic [6:0] clamp(input logic [6:0] p, input logic [1:0] off);
    logic signed [8:0] s;
    s = 9'(signed'({2'b00, p})) + 9'(signed'({7'b0, off})) - 9'sd1;
    if (s < 9'sd0)                   return 7'd0;
    if (s > 9'(signed'(N - 1)))      return 7'(N - 1);
    return s[6:0];
  endfunction

  always_comb begin
    u_col = clamp(col, ta);
    u_row = clamp(row, tb);
    u_rsc_singleport_re      = (state == S_READ);
    u_rsc_singleport_addr    = RAM_AW'(u_row * N + u_col);
    h_rsc_singleport_re      = (state == S_READ);
    h_rsc_singleport_addr    = 4'(TAPS - 1) - tap;
    y_rsc_singleport_we      = (state == S_WRITE);
    y_rsc_singleport_addr    = RAM_AW'(row * N + col);
    y_rsc_singleport_data_in = acc;
    u_rsc_singleport_we      = 1'b0;
    u_rsc_singleport_data_in = '0;
    h_rsc_singleport_we      = 1'b0;
    h_rsc_singleport_data_in = '0;
    y_rsc_singleport_re      = 1'b0;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      done     <= 1'b1;
      col      <= '0;
      row      <= '0;
      tap      <= '0;
      ta       <= '0;
      tb       <= '0;
      rd_valid <= 1'b0;
      rd_first <= 1'b0;
      acc      <= '0;
    end else begin
      rd_valid <= (state == S_READ);
      rd_first <= (state == S_READ) && (tap == 4'd0);
      if (rd_valid)
        acc <= u_rsc_singleport_data_out * h_rsc_singleport_data_out + (rd_first ? 32'd0 : acc);
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_READ;
          done  <= 1'b0;
          col   <= '0;
          row   <= '0;
          tap   <= '0;
          ta    <= '0;
          tb    <= '0;
        end
        S_READ: begin
          if (tap == 4'(TAPS - 1)) begin
            tap   <= '0;
            ta    <= '0;
            tb    <= '0;
            state <= S_LAST;
          end else begin
            tap <= tap + 4'd1;
            if (ta == 2'd2) begin
              ta <= '0;
              tb <= tb + 2'd1;
            end else begin
              ta <= ta + 2'd1;
            end
          end
        end
        S_LAST: state <= S_WRITE;
        S_WRITE: begin
          if (col == 7'(N - 1)) begin
            col <= '0;
            if (row == 7'(N - 1)) begin
              row   <= '0;
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              row   <= row + 7'd1;
              state <= S_READ;
            end
          end else begin
            col   <= col + 7'd1;
            state <= S_READ;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_hy_exclusive: assert property (@(posedge clk) disable iff (rst)
                                   !(h_rsc_singleport_re && y_rsc_singleport_we));

endmodule
