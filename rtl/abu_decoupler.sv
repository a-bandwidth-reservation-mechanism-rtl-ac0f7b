// abu_decoupler: valid/ready switch on one AXI channel.
//
// The ABU routes the channels of a HW-task through decouplers that can stop
// the task from issuing transactions. While `enable` is high the channel is
// connected: valid goes downstream and ready comes back unchanged. While it is
// low both handshake signals are cut (the slave sees no valid, the master sees
// no ready), so nothing can complete on the channel. The payload always passes
// straight through. The block is combinational and adds no latency.
//
// Keeping a downstream valid high until it is accepted, as AXI requires, is
// the job of whoever drives `enable` (the ABU holds it high for a request that
// has already been offered downstream).
//
// From the design description: decoupler blocks that disconnect the valid and
// ready handshake signals. The type parameter for the payload is this
// design's choice.
module abu_decoupler #(
  parameter type T = logic [7:0]
) (
  input  logic enable,
  // upstream (from the HW-task)
  input  logic s_valid,
  output logic s_ready,
  input  T     s_data,
  // downstream (towards the interconnect)
  output logic m_valid,
  input  logic m_ready,
  output T     m_data
);

  assign m_valid = s_valid & enable;
  assign s_ready = m_ready & enable;
  assign m_data  = s_data;

endmodule
