// mac_link_if: the request / clear / confirm link between two stacked MAC
// blocks (the arrows labelled request, clear and confirm in the MAC function
// stack).
//
// The upper block (modport src) pulses `req` for one cycle with the frame in
// `frm`; it has at most one request outstanding. The lower block (modport dst)
// answers with a one-cycle `cfm` pulse, `ok` high for success. A one-cycle
// `clr` pulse from the upper block aborts the outstanding request; no confirm
// follows a clear. The pulse-and-wait handshake is this design's own choice.
interface mac_link_if;
  import mac_pkg::*;
  logic   req;
  frame_t frm;
  logic   clr;
  logic   cfm;
  logic   ok;
  modport src (output req, frm, clr, input  cfm, ok);
  modport dst (input  req, frm, clr, output cfm, ok);
endinterface
