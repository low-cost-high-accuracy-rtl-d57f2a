// speed_measurement: rotor speed from the Hall sensor edges.
//
// Every edge of any Hall signal marks 1/6 of an electrical revolution, so a
// motor with one pole pair gives six measurements per revolution, as in the
// design. The time between two edges is counted in 1 us ticks (the model
// step enable) and the speed is omega = NUM / count with NUM = (pi/3) * 1e6 *
// 2^SPEED_FRAC, computed by a 24-cycle restoring divider. The sign comes from the
// order of the Hall states: the forward sequence is 001, 101, 100, 110, 010,
// 011 (own choice of sign detection). A jump between Hall states that are not
// neighbours restarts the measurement. If no edge comes within twice the last
// interval the estimate is halved (and the interval doubled); after MAX_COUNT
// ticks without an edge the speed is reported as 0 (own choices).
// valid pulses for one cycle when omega is updated. The divider form is own
// choice; the design only names the measuring method.
module speed_measurement
  import ctrl_pkg::*;
#(
  parameter int MAX_COUNT = 1_000_000,
  parameter int NUM       = 8_377_580     // round(pi/3 * 1e6 * 8)
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       tick,
  input  logic [2:0] hall,
  output q16_t       omega,
  output logic       valid
);
  logic [2:0]  hall_d;
  logic [23:0] cnt, div_d, quo, rem;
  logic [4:0]  bitn;
  logic        dividing, seen, rev, rev_d;

  function automatic logic [2:0] fwd_next(input logic [2:0] h);
    unique case (h)
      3'b001:  return 3'b101;
      3'b101:  return 3'b100;
      3'b100:  return 3'b110;
      3'b110:  return 3'b010;
      3'b010:  return 3'b011;
      3'b011:  return 3'b001;
      default: return 3'b000;
    endcase
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      hall_d <= '0; cnt <= '0; omega <= '0; valid <= 1'b0; dividing <= 1'b0; seen <= 1'b0;
      div_d <= '0; quo <= '0; rem <= '0; bitn <= '0; rev <= 1'b0; rev_d <= 1'b0;
    end else begin
      valid  <= 1'b0;
      hall_d <= hall;
      if (hall != hall_d && !(hall == fwd_next(hall_d) || hall_d == fwd_next(hall))) begin
        // not a neighbouring Hall state (start-up or a sensor fault): restart
        seen <= 1'b0;
        cnt  <= '0;
      end else if (hall != hall_d) begin
        if (seen && !dividing && cnt != 0) begin
          div_d <= cnt; quo <= '0; rem <= '0; bitn <= 5'd23; dividing <= 1'b1;
          rev_d <= rev;
        end
        seen <= 1'b1;
        cnt  <= '0;
        rev  <= (hall != fwd_next(hall_d));
      end else if (tick) begin
        if (cnt == 24'(MAX_COUNT)) begin
          omega <= '0; seen <= 1'b0;
        end else begin
          cnt <= cnt + 1'b1;
          // no edge within twice the last interval: the rotor is slowing down
          if (seen && div_d != 0 && cnt != 0 && cnt == {div_d[22:0], 1'b0}) begin
            omega  <= omega >>> 1;
            div_d  <= {div_d[22:0], 1'b0};
          end
        end
      end
      if (dividing) begin : restoring_step
        logic [24:0] r2;
        r2 = {rem, NUM[bitn]};
        if (r2 >= {1'b0, div_d}) begin
          rem <= 24'(r2 - {1'b0, div_d});
          quo[bitn] <= 1'b1;
        end else begin
          rem <= r2[23:0];
        end
        if (bitn == 0) dividing <= 1'b0;
        else bitn <= bitn - 1'b1;
      end
      if (!dividing && quo != 0 && bitn == 0 && seen) begin
        omega <= rev_d ? -(quo > 24'd32767 ? 16'sh7FFF : q16_t'(quo))
                       :  (quo > 24'd32767 ? 16'sh7FFF : q16_t'(quo));
        valid <= 1'b1;
        quo <= '0;
      end
    end
  end
endmodule
