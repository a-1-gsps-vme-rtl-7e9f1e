// delay_counter: the wait between a STOP and the next START in REPEAT mode.
//
// Loaded with the programmed delay when the STOP arrives, it counts down
// once per 50 MHz cycle and gives a one-cycle done pulse exactly `delay`
// cycles after the load, which the trigger logic turns into an automatic
// START. A delay of 0 gives done on the cycle after the load. The design
// asks for delays longer than the 200 ns the logic needs to set itself up
// again. 16 bits as in the design; counting 50 MHz cycles is this design's
// reading.
module delay_counter #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] delay,
  output logic         running,
  output logic         done
);
  logic [W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; running <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (load) begin
        if (delay <= W'(1)) begin
          running <= 1'b0;
          done    <= 1'b1;
        end else begin
          cnt     <= delay - 1'b1;
          running <= 1'b1;
        end
      end else if (running) begin
        cnt <= cnt - 1'b1;
        if (cnt == W'(1)) begin
          running <= 1'b0;
          done    <= 1'b1;
        end
      end
    end
  end
endmodule
