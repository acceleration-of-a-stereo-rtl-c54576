// conv_repl -- ConvRepl1 / ConvRepl2: 11-tap floating-point line convolution.
//
// Filters a TILE_N x TILE_N matrix U of IEEE-754 single-precision values with
// an 11-element vector H, along each row (VERTICAL = 0, ConvRepl1) or each
// column (VERTICAL = 1, ConvRepl2), writing the matrix Y:
//   y[i,j] = sum_{k=0..10} u[clamp(i+k-5), j] * h[10-k]        (rows)
//   y[i,j] = sum_{k=0..10} u[i, clamp(j+k-5)] * h[10-k]        (columns)
// An index that falls outside 0..TILE_N-1 is clamped to the edge. Element
// (column i, row j) is word j*TILE_N+i of its RAM. The accumulator starts at
// zero and takes the taps in the order k = 0..10, each product rounded and
// then added with rounding (fp32_mul, fp32_add), as the software did.
//
// The port list and names are those of the original engine: one single-port
// RAM interface each for u, h and y, plus clk, rst, start and done. Ports the
// engine never uses (writes to u and h, reads of y) are kept and held at 0.
// U and H come from RAMs with one cycle of read latency; H and Y share a RAM,
// so h_re and y_we are never high in the same cycle.
//
// Handshake (from the original): done is 1 after reset; start is sampled
// while idle, done drops on the next cycle and returns to 1 once the last Y
// word is written. A start still high at that point starts a new run.
//
// Schedule (this design's own): per output word, 11 cycles each reading one
// u and one h word, one cycle to add the last product, one cycle to write y:
// 13 cycles per word, 13*TILE_N*TILE_N cycles from start to done.
module conv_repl
  import conv_pkg::*;
#(
  parameter bit          VERTICAL = 1'b0,
  parameter int unsigned N        = TILE_N
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

  localparam int unsigned TAPS = 11;
  localparam int unsigned HALF = TAPS / 2;

  typedef enum logic [1:0] {S_IDLE, S_READ, S_LAST, S_WRITE} state_e;

  state_e      state;
  logic [6:0]  col, row;          // output element being computed
  logic [3:0]  tap;               // tap being read
  logic        rd_valid, rd_first;
  logic [31:0] acc, prod, sum;
  logic signed [8:0] pos;         // tap position along the filtered axis
  logic [6:0]  pos_c;             // clamped position
  logic [6:0]  u_col, u_row;

  // clamped address of the current tap
  always_comb begin
    pos   = 9'(signed'({2'b00, (VERTICAL ? row : col)})) + 9'(signed'({5'b0, tap})) - 9'sd5;
    if (pos < 9'sd0)                  pos_c = 7'd0;
    else if (pos > 9'(signed'(N - 1))) pos_c = 7'(N - 1);
    else                              pos_c = pos[6:0];
    u_col = VERTICAL ? col : pos_c;
    u_row = VERTICAL ? pos_c : row;
  end

  always_comb begin
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

  fp32_mul u_mul (.a(u_rsc_singleport_data_out), .b(h_rsc_singleport_data_out), .y(prod));
  fp32_add u_add (.a(prod), .b(rd_first ? 32'd0 : acc), .y(sum));

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      done     <= 1'b1;
      col      <= '0;
      row      <= '0;
      tap      <= '0;
      rd_valid <= 1'b0;
      rd_first <= 1'b0;
      acc      <= '0;
    end else begin
      rd_valid <= (state == S_READ);
      rd_first <= (state == S_READ) && (tap == 4'd0);
      if (rd_valid) acc <= sum;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_READ;
          done  <= 1'b0;
          col   <= '0;
          row   <= '0;
          tap   <= '0;
        end
        S_READ: begin
          if (tap == 4'(TAPS - 1)) begin
            tap   <= '0;
            state <= S_LAST;
          end else begin
            tap <= tap + 4'd1;
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

  // H and Y share one RAM port
  a_hy_exclusive: assert property (@(posedge clk) disable iff (rst)
                                   !(h_rsc_singleport_re && y_rsc_singleport_we));

endmodule
