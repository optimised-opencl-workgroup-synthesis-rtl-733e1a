// ocl_pkg: types and constants shared by the OpenCL compute device.
//
// The compute units reach DDR memory through AXI4 master ports (one per
// unit, in the reference system the four HP ports and the ACP port of the
// processing system). The channels are modelled as packed structs so that
// arrays of ports can be brought out of the top level. The data bus is 32
// bits: one binary32 value per beat, which at 100 MHz is the 400 MB/s per
// port quoted for the target. Only INCR bursts of 4-byte beats are issued,
// so AxSIZE/AxBURST are implied and left out; IDs are not used because each
// master keeps a single burst in flight.
//
// cu_args_t holds the arguments of one compute-unit run (the scalar kernel
// arguments plus the transfer sizes that a host driver passes along).
package ocl_pkg;

  localparam int unsigned AXI_AW = 32;
  localparam int unsigned AXI_DW = 32;
  localparam int unsigned AXI_MAX_BURST = 256;   // AXI4 INCR limit (beats)
  localparam int unsigned AXI_BOUNDARY = 4096;   // bursts never cross 4 KB

  typedef logic [31:0] f32_t;                     // IEEE-754 binary32

  // AXI4 address channel (AR or AW), master -> slave
  typedef struct packed {
    logic              valid;
    logic [AXI_AW-1:0] addr;
    logic [7:0]        len;     // beats - 1
  } axi_a_t;

  // AXI4 read data channel, slave -> master
  typedef struct packed {
    logic              valid;
    logic [AXI_DW-1:0] data;
    logic              last;
    logic [1:0]        resp;
  } axi_r_t;

  // AXI4 write data channel, master -> slave
  typedef struct packed {
    logic              valid;
    logic [AXI_DW-1:0] data;
    logic [3:0]        strb;
    logic              last;
  } axi_w_t;

  // AXI4 write response channel, slave -> master
  typedef struct packed {
    logic       valid;
    logic [1:0] resp;
  } axi_b_t;

  // Arguments of one compute-unit run. Addresses and sizes are in bytes,
  // as in memcpy(A, mem + a_offset, INBS).
  typedef struct packed {
    logic [31:0] mem;            // base address of the buffers in DDR
    logic [31:0] a_offset;       // input region of the first workgroup
    logic [31:0] b_offset;       // output region of the first workgroup
    logic [15:0] in_dn;          // INDN: rows read per workgroup
    logic [31:0] in_ls;          // INLS: bytes per input row
    logic [31:0] in_stride;      // bytes between input rows in DDR
    logic [15:0] out_dn;         // OUTDN: rows written per workgroup
    logic [31:0] out_ls;         // OUTLS: bytes per output row
    logic [31:0] out_stride;     // bytes between output rows in DDR
    logic [15:0] gw;             // workgroup width  (work-items)
    logic [15:0] gh;             // workgroup height (work-items)
    logic [15:0] n_groups;       // workgroups run one after another
    logic [31:0] in_group_step;  // a_offset advance per workgroup
    logic [31:0] out_group_step; // b_offset advance per workgroup
  } cu_args_t;

endpackage
