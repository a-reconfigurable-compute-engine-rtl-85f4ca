// cdp_counter: the CT counter of a CDP, two 8-bit presettable down-counters
// that can be cascaded into one 16-bit counter.
//
// 'load' presets both halves from 'preset' (the KCT constant). 'step'
// counts down by one; in cascade mode the high half borrows from the low
// half. NULL is asserted while the counter (16-bit in cascade mode, the low
// 8-bit counter otherwise) is zero; a step taken at NULL reloads the preset
// instead, so a counter preset to N-1 cycles through N addresses. Counting
// down, auto-reload and the priority of load over step are this design's
// choices; the architecture gives only the two presettable cascadable
// 8-bit counters and the NULL output. One clock cycle per operation.
module cdp_counter (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cascade,
  input  logic [15:0] preset,
  input  logic        load,
  input  logic        step,
  output logic [15:0] value,
  output logic        null_o
);
  logic [7:0] lo, hi;

  assign value  = {hi, lo};
  assign null_o = cascade ? (value == 16'd0) : (lo == 8'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lo <= '0;
      hi <= '0;
    end else if (load || (step && null_o)) begin
      lo <= preset[7:0];
      if (cascade || load) hi <= preset[15:8];
    end else if (step) begin
      lo <= lo - 1'b1;
      if (cascade && lo == 8'd0) hi <= hi - 1'b1;
    end
  end
endmodule
