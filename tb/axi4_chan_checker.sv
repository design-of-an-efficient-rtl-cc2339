// axi4_chan_checker: watches one AXI-4 channel and counts breaches of the
// VALID/READY handshake rules.
//
// Once VALID is high it must stay high, with the payload unchanged, until
// READY is seen with it. Every clock that breaks this adds one to
// violations. Testbenches instantiate one checker per channel and add the
// counts to their failures. The payload type is a parameter, so any of the
// channel structs of axi4_pkg can be checked.
module axi4_chan_checker #(
  parameter type T = logic [7:0]
) (
  input  logic        clk,
  input  logic        rstn,
  input  logic        valid,
  input  logic        ready,
  input  T            payload,
  output int unsigned violations,
  output int unsigned handshakes
);

  logic pend;   // VALID was high without READY on the previous clock
  T     held;

  always_ff @(posedge clk or negedge rstn) begin
    if (!rstn) begin
      pend       <= 1'b0;
      held       <= '0;
      violations <= 0;
      handshakes <= 0;
    end else begin
      if (pend && (!valid || payload != held)) violations <= violations + 1;
      if (valid && ready) handshakes <= handshakes + 1;
      pend <= valid && !ready;
      held <= payload;
    end
  end

  // the same rule as a property, for simulators that evaluate assertions
  property p_hold;
    @(posedge clk) disable iff (!rstn)
      (valid && !ready) |=> (valid && $stable(payload));
  endproperty
  a_hold: assert property (p_hold)
    else $display("handshake rule broken at %0t: VALID dropped or payload changed before READY", $time);

endmodule
