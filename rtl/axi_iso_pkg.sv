// axi_iso_pkg: constants and helpers shared by the AXI Enforcer, the AXI ID
// Mapper (AIM) and the port-isolation modules built from them.
//
// The widths of the isolation-relevant AXI attributes are fixed here.
// AxUSER is 10 bits because the enforced and mapped AxUSER values range over
// 0..1023; the AXI ID is 6 bits, the ID width of the PL-PS ports of the
// Zynq UltraScale+ targeted by this design. The Stream ID helper reproduces
// how the processing system forms a Stream ID from a PL-PS transaction
// (TBU number, port manager ID, AXI ID); it is used by the testbenches to
// show that every accelerator ends up with Stream IDs of its own.
package axi_iso_pkg;

  // AXI ID width of a PL-PS port (UltraScale+: 6 bits).
  localparam int unsigned AXI_ID_WIDTH   = 6;
  // AxUSER carries the manager identifier (values 0..1023).
  localparam int unsigned AXI_USER_WIDTH = 10;
  // Largest number of managers / pool size of one AIM (Table of AIM parameters: 1..64).
  localparam int unsigned MAX_MANAGERS   = 64;

  // AxUSER value associated with each AIM pool, entry i for pool i.
  typedef logic [MAX_MANAGERS-1:0][AXI_USER_WIDTH-1:0] user_map_t;

  // Default pool map: pool i is selected by AxUSER == i.
  function automatic user_map_t identity_user_map();
    user_map_t m;
    for (int i = 0; i < MAX_MANAGERS; i++) m[i] = AXI_USER_WIDTH'(i);
    return m;
  endfunction

  // Stream ID seen by the SMMU for a PL-PS transaction:
  // bits 14:10 TBU number, bits 9:6 manager ID of the port, bits 5:0 AXI ID.
  function automatic logic [14:0] stream_id(logic [4:0] tbu, logic [3:0] port_mid,
                                            logic [5:0] axi_id);
    return {tbu, port_mid, axi_id};
  endfunction

endpackage
