// ahb_lite_master_if: AHB-Lite bus bundle with a simple master for testbenches.
//
// Holds the signals between one master and one slave and tasks that run
// single word transfers (write, read) and a pipelined pair of reads. Signals
// are driven on the falling edge of HCLK, so they are stable at the rising
// edge where the slave samples them; read data is sampled at the falling edge
// in the middle of the data phase. HREADY is looped back from HREADYOUT.
interface ahb_lite_master_if (input logic HCLK);
  logic        HRESETn;
  logic        HSEL;
  logic [31:0] HADDR;
  logic [1:0]  HTRANS;
  logic        HWRITE;
  logic [2:0]  HSIZE;
  logic [31:0] HWDATA;
  logic        HREADY;
  logic [31:0] HRDATA;
  logic        HREADYOUT;
  logic        HRESP;

  assign HREADY = HREADYOUT;

  task automatic idle();
    HSEL   = 1'b0;
    HADDR  = '0;
    HTRANS = 2'b00;
    HWRITE = 1'b0;
    HSIZE  = 3'b010;
    HWDATA = '0;
  endtask

  task automatic wait_ready();
    while (!HREADYOUT) @(negedge HCLK);
  endtask

  task automatic write(input logic [31:0] addr, input logic [31:0] data);
    @(negedge HCLK);
    HSEL = 1'b1; HADDR = addr; HTRANS = 2'b10; HWRITE = 1'b1; HSIZE = 3'b010;
    @(negedge HCLK);
    wait_ready();
    HSEL = 1'b0; HTRANS = 2'b00; HWRITE = 1'b0; HWDATA = data;
    @(negedge HCLK);
    wait_ready();
  endtask

  task automatic read(input logic [31:0] addr, output logic [31:0] data);
    @(negedge HCLK);
    HSEL = 1'b1; HADDR = addr; HTRANS = 2'b10; HWRITE = 1'b0; HSIZE = 3'b010;
    @(negedge HCLK);
    wait_ready();
    HSEL = 1'b0; HTRANS = 2'b00;
    data = HRDATA;
  endtask

  // Two reads back to back: the second address phase overlaps the first
  // data phase.
  task automatic read_pair(input logic [31:0] a0, input logic [31:0] a1,
                           output logic [31:0] d0, output logic [31:0] d1);
    @(negedge HCLK);
    HSEL = 1'b1; HADDR = a0; HTRANS = 2'b10; HWRITE = 1'b0; HSIZE = 3'b010;
    @(negedge HCLK);
    wait_ready();
    HADDR = a1;
    d0 = HRDATA;
    @(negedge HCLK);
    wait_ready();
    HSEL = 1'b0; HTRANS = 2'b00;
    d1 = HRDATA;
  endtask
endinterface
