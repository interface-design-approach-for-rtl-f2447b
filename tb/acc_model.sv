// acc_model: behavioural model of a fine-granularity accelerator for the
// testbenches (not synthesised). It stands in for a DCT stage: the W-bit
// operand is split into two halves a (upper) and b (lower) and the result is
// the butterfly {a + b, a - b}, each half modulo 2^(W/2).
// Protocol: the operand is sampled on the clock edge where start is high; busy
// is high for LAT cycles starting with the next one, and ydata holds the
// result from the cycle where busy falls. With LAT = 0 busy stays low and the
// result is there one cycle after start. With RAND_LAT = 1 each run takes a
// random 1..LAT cycles (a non-deterministic accelerator). Counts starts and
// flags a start that arrives while busy.
module acc_model #(
  parameter int unsigned W        = 64,
  parameter int unsigned LAT      = 4,
  parameter bit          RAND_LAT = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] xdata,
  input  logic         start,
  output logic         busy,
  output logic [W-1:0] ydata,
  output int           n_start,
  output int           n_proto_err
);
  localparam int unsigned H = W / 2;

  logic [W-1:0] x_q;
  int           cnt;

  function automatic logic [W-1:0] butterfly(input logic [W-1:0] x);
    logic [H-1:0] a, b;
    a = x[W-1:H];
    b = x[H-1:0];
    return {H'(a + b), H'(a - b)};
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      ydata       <= '0;
      x_q         <= '0;
      cnt         <= 0;
      n_start     <= 0;
      n_proto_err <= 0;
    end else begin
      if (start) begin
        n_start <= n_start + 1;
        if (busy) n_proto_err <= n_proto_err + 1;
        if (LAT == 0) begin
          ydata <= butterfly(xdata);
        end else begin
          x_q  <= xdata;
          busy <= 1'b1;
          cnt  <= RAND_LAT ? int'($urandom_range(LAT, 1)) : int'(LAT);
        end
      end else if (busy) begin
        if (xdata != x_q) n_proto_err <= n_proto_err + 1;  // operand must stay stable
        if (cnt == 1) begin
          busy  <= 1'b0;
          ydata <= butterfly(x_q);
        end
        cnt <= cnt - 1;
      end
    end
  end
endmodule
