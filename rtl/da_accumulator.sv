// da_accumulator: scaled accumulation of table values, acc <= acc*2^-1 +/- value.
//
// Bit positions arrive LSB first. The table value of position l is added with
// weight 2^(B-1) and the running sum is halved (arithmetic shift right, the
// 2^-1 block of the original block diagram) before each new value is added, so after B
// steps acc = sum_l 2^l * value_l. The value of the last position, the sign
// bit of the samples, is subtracted instead of added, through one ripple-carry
// adder/subtractor. Aligning the value at 2^(B-1) keeps every bit: the halving
// only ever drops zeros, so the result is exact in W_IN + B bits.
// PIPE = 1 inserts the optional pipelining register of the original block diagram
// between the table and the adder, adding one cycle of latency.
// Timing: y and y_valid change one cycle after the last value is taken (plus
// PIPE cycles after it is presented); y keeps its value until the next sample's
// first value. Synchronous, active-low reset.
module da_accumulator #(
  parameter int  W_IN = 6,  // width of the signed table value
  parameter int  B    = fir_pkg::B_DATA,
  parameter bit  PIPE = 1'b1,
  localparam int W_ACC = W_IN + B
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [W_IN-1:0]  value,
  input  logic                    valid,
  input  logic                    first,
  input  logic                    last,
  output logic signed [W_ACC-1:0] y,
  output logic                    y_valid
);
  logic signed [W_IN-1:0]  v_q;
  logic                    valid_q, first_q, last_q;

  if (PIPE) begin : g_pipe
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        v_q     <= '0;
        valid_q <= 1'b0;
        first_q <= 1'b0;
        last_q  <= 1'b0;
      end else begin
        v_q     <= value;
        valid_q <= valid;
        first_q <= first;
        last_q  <= last;
      end
    end
  end else begin : g_nopipe
    always_comb begin
      v_q     = value;
      valid_q = valid;
      first_q = first;
      last_q  = last;
    end
  end

  logic signed [W_ACC-1:0] acc, base, addend, sum;
  logic                    ovf;

  always_comb begin
    base   = acc >>> 1;            // 2^-1 scaling, sign kept
    if (first_q) base = '0;
    addend = W_ACC'(v_q) <<< (B - 1);
  end

  adder_subtractor #(.W(W_ACC)) u_addsub (
    .a       (base),
    .b       (addend),
    .sub     (last_q),
    .result  (sum),
    .overflow(ovf)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc     <= '0;
      y_valid <= 1'b0;
    end else begin
      if (valid_q) acc <= sum;
      y_valid <= valid_q && last_q;
    end
  end

  assign y = acc;

  // The width is chosen so that the accumulation can never overflow.
  assert property (@(posedge clk) disable iff (!rst_n) valid_q |-> !ovf);
endmodule
