// level_shift_dct: the L/D actor, level shift and 8x8 forward DCT.
//
// An actor firing takes one 8x8 block of 64 unsigned samples (row-major),
// subtracts 128 from each, and produces the 64 DCT coefficients
//   F(v,u) = 1/4 c(u) c(v) sum_y sum_x f(y,x) cos((2x+1)u pi/16) cos((2y+1)v pi/16)
// in row-major (natural) order, v being the row. The transform is computed
// separably with the integer basis jpeg_pkg::dct_basis (scale 2^13):
//   pass 1, rows:    t(y,u) = round(sum_x A(u,x) f(y,x) / 2^10)  (scale 2^3)
//   pass 2, columns: F(v,u) = round(sum_y A(v,y) t(y,u) / 2^16)
// where round adds one half and floors. Each cycle evaluates one 8-term dot
// product with eight multipliers, so a pass takes 64 cycles.
//
// Interface: valid/ready sample input, valid/ready coefficient output.
// Timing per block: 64 cycles to load, 64 for the row pass, then one
// coefficient per cycle while the output is ready, about 192 cycles in all.
// A new block is loaded only after the last coefficient has left; the
// actor blocks on an empty input or a full output like its software
// counterpart.
//
// Level shift followed by the DCT as one actor follows the source design;
// the fixed-point scheme and the serial 8-multiplier datapath are this
// design's choice.
module level_shift_dct
  import jpeg_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t s_data,
  input  logic    s_valid,
  output logic    s_ready,
  output coef_t   m_data,
  output logic    m_valid,
  input  logic    m_ready
);

  typedef enum logic [1:0] {S_LOAD, S_ROW, S_COL} state_e;

  state_e              state;
  logic [5:0]          idx;            // sample / coefficient index
  logic signed [8:0]   f   [BLOCK_N];  // level-shifted samples
  logic signed [15:0]  t   [BLOCK_N];  // row-pass results, scale 2^3
  logic signed [15:0]  row_res;
  coef_t               col_res;

  // Row pass: idx = {y, u}; dot product of row y of f with basis row u.
  always_comb begin
    logic signed [31:0] acc;
    logic [2:0] y, u;
    y = idx[5:3];
    u = idx[2:0];
    acc = 32'sd512;
    for (int x = 0; x < 8; x++)
      acc += 32'(dct_basis(u, x)) * 32'(f[{y, 3'(x)}]);
    row_res = 16'(acc >>> 10);
  end

  // Column pass: idx = {v, u}; dot product of column u of t with basis row v.
  always_comb begin
    logic signed [31:0] acc;
    logic [2:0] v, u;
    v = idx[5:3];
    u = idx[2:0];
    acc = 32'sd32768;
    for (int y = 0; y < 8; y++)
      acc += 32'(dct_basis(v, y)) * 32'(t[{3'(y), u}]);
    col_res = coef_t'(acc >>> 16);
  end

  assign s_ready = (state == S_LOAD);
  assign m_valid = (state == S_COL);
  assign m_data  = col_res;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_LOAD;
      idx   <= '0;
    end else begin
      unique case (state)
        S_LOAD: if (s_valid) begin
          idx <= idx + 1'b1;
          if (idx == 6'd63) state <= S_ROW;
        end
        S_ROW: begin
          idx <= idx + 1'b1;
          if (idx == 6'd63) state <= S_COL;
        end
        S_COL: if (m_ready) begin
          idx <= idx + 1'b1;
          if (idx == 6'd63) state <= S_LOAD;
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (state == S_LOAD && s_valid) f[idx] <= $signed({1'b0, s_data}) - 9'sd128;
    if (state == S_ROW)             t[idx] <= row_res;
  end

endmodule
