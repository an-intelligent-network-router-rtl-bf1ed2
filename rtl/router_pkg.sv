// router_pkg: types and constants shared by the segregating routers.
//
// The duration classes follow the three channels of the duration based router
// (short, medium and long duration data). A duration request, queued ahead of
// the duration routers, carries an identifier and its duration class. The
// identifier width is this design's own choice; the three classes are the
// document's.
package router_pkg;

  // Duration class of data on the line, or of a queued request.
  typedef enum logic [1:0] {
    DUR_SHORT  = 2'd0,
    DUR_MEDIUM = 2'd1,
    DUR_LONG   = 2'd2
  } dur_class_e;

  // Width of a request identifier in the request queue (own choice).
  localparam int unsigned REQ_ID_W = 8;

  typedef struct packed {
    logic [REQ_ID_W-1:0] id;
    dur_class_e          dur;
  } dur_req_t;

endpackage
