// weight_storage: weight store of one convolution core.
//
// A FIFO-style write port receives the pre-encoded weight tuples one per
// cycle (w_valid) and stores them in registers in arrival order: channel 0
// first, inside a channel row by row, column by column. During convolution the
// K*K tuples of the channel selected by ch are presented in parallel, one per
// multiplier (kernel[r*K + c] feeds the multiplier of row r, column c).
// clear empties the store. Writes beyond MAX_CH*K*K tuples are dropped and
// flagged by an assertion. Reads are combinational; count and full are
// registered state. In an FPGA flow the same registers can be replaced by a
// ROM initialised with the network's encoded weights.
module weight_storage #(
  parameter int unsigned K      = 3,
  parameter int unsigned MAX_CH = 20,
  parameter int unsigned TW     = 10,
  localparam int unsigned DEPTH = MAX_CH * K * K,
  localparam int unsigned AW    = $clog2(DEPTH + 1),
  localparam int unsigned CW    = (MAX_CH > 1) ? $clog2(MAX_CH) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic                    w_valid,
  input  logic [TW-1:0]           w_tuple,
  input  logic [CW-1:0]           ch,
  output logic [K*K-1:0][TW-1:0]  kernel,
  output logic [AW-1:0]           count,
  output logic                    full
);
  logic [TW-1:0] regs [DEPTH];

  assign full = (count == AW'(DEPTH));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
    end else if (clear) begin
      count <= '0;
    end else if (w_valid && !full) begin
      count <= count + AW'(1);
    end
  end

  always_ff @(posedge clk) begin
    if (w_valid && !full && !clear) regs[count] <= w_tuple;
  end

  always_comb begin
    for (int unsigned i = 0; i < K * K; i++) begin
      kernel[i] = regs[ch * (K * K) + i];
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  !(w_valid && full && !clear))
    else $error("weight_storage: write while full");
endmodule
