// radio_link_model: behavioural model (not synthesizable logic of the node)
// of two serial radio transceivers in range of each other. A byte stream
// written into one node's radio_din appears at the other node's radio_dout
// only while both radios are awake (sleep request low) and the link is up;
// otherwise the receiving line idles high. Air time and RF latency are not
// modelled.
module radio_link_model (
  input  logic a_din,
  input  logic a_sleep_rq,
  input  logic b_din,
  input  logic b_sleep_rq,
  input  logic link_up,
  output logic a_dout,
  output logic b_dout
);
  logic pass;
  assign pass   = link_up && !a_sleep_rq && !b_sleep_rq;
  assign a_dout = pass ? b_din : 1'b1;
  assign b_dout = pass ? a_din : 1'b1;
endmodule
