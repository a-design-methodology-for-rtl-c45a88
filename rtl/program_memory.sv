// program_memory: the MPU's program store.
//
// DEPTH words of WIDTH bits (256 x 16 by default, i.e. 4,096 memory bits as
// reported for the basic MPU on an ACEX1K device). Read is asynchronous:
// `data` follows `addr` within the cycle. The contents are fixed at
// configuration, loaded from the hex image INIT_FILE (one word per line);
// an empty INIT_FILE leaves an all-zero (NOP) program. There is no run-time
// write port, as the program is part of the FPGA configuration. FPGA tools
// turn the $readmemh into the memory's initial contents; a synthesis front
// end that does not execute it sees an all-zero ROM.
module program_memory #(
  parameter int    DEPTH     = 256,
  parameter int    WIDTH     = 16,
  parameter string INIT_FILE = "rtl/motor_ctrl_prog.hex"
) (
  input  logic [$clog2(DEPTH)-1:0] addr,
  output logic [WIDTH-1:0]         data
);

  logic [WIDTH-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  assign data = mem[addr];

endmodule
