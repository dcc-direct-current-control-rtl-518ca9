// timeout_timer - the vector selector's timeout.
//
// Counts clocks since the last restart (a change of the applied voltage
// vector). When the count reaches limit it gives one pulse on expired and
// then holds until the next restart. limit = 0 turns the timeout off.
//
// Interface: restart (pulse), limit in clocks, expired (one-clock pulse).
// Timing: after a restart in clock t, expired is high in the clock that
// follows edge t + limit.
// The timeout and its purpose follow the design; the restart on every
// vector change is this design's own choice.
module timeout_timer #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             restart,
  input  logic [WIDTH-1:0] limit,
  output logic             expired
);

  logic [WIDTH-1:0] count;
  logic             done;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      count   <= '0;
      done    <= 1'b0;
      expired <= 1'b0;
    end else begin
      expired <= 1'b0;
      if (restart) begin
        count <= '0;
        done  <= 1'b0;
      end else if (!done && limit != '0) begin
        count <= count + 1'b1;
        if (count + 1'b1 == limit) begin
          expired <= 1'b1;
          done    <= 1'b1;
        end
      end
    end

endmodule
