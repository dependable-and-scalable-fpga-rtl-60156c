// cpr_req_throttle: request throttling gates for one valid/ready request
// channel (e.g. AXI4 AR or AW).
//
// While req_en is 0 no new request may cross the boundary between the user
// circuit and the communication channel: the request valid is forced to 0 on
// its way to the accepting side and the ready is forced to 0 on its way back
// to the requesting side, so the requester neither issues a request nor sees
// one accepted. With req_en = 1 both pass unchanged.
//   User circuit as master: valid_in = arvalid, valid_out = ARVALID,
//                           ready_in = ARREADY, ready_out = arready.
//   User circuit as slave : valid_in = ARVALID, valid_out = arvalid,
//                           ready_in = arready, ready_out = ARREADY.
// The two gates for each side are the document's; the module is purely
// combinational and adds no latency.
module cpr_req_throttle (
  input  logic req_en,
  input  logic valid_in,    // valid from the requesting side
  output logic valid_out,   // valid to the accepting side
  input  logic ready_in,    // ready from the accepting side
  output logic ready_out    // ready to the requesting side
);

  assign valid_out = req_en & valid_in;
  assign ready_out = req_en & ready_in;

endmodule
