// bac_pc: the BAC program counter.
//
// The PC advances by one every clock cycle; on a jump its low 8 bits are
// loaded with the jump target (the ALU output). When the program space is
// larger than 256 words (PAW > 8) the PC has a page part above bit 7. That
// part counts on from the low byte's carry and is left alone by ordinary
// jumps, so a jump stays in the current 256-word page (the page of the PC,
// which is already one ahead of the jump instruction). A jump executed in
// the cycle right after a PG write (LDPG) is a long jump: the page bits are
// then copied from PG. A flip-flop, ljmp, remembers that PG was written in
// the previous cycle.
//
// Timing: pc and ljmp change on the rising clock edge; reset (asynchronous,
// active high) clears both. Clearing ljmp on reset is this implementation's
// addition; the rest follows the design.
module bac_pc #(
  parameter int unsigned PAW = 8,          // program address width, >= 8
  parameter int unsigned PGW = 1           // width of the PG input, >= 1
) (
  input  logic           clk,
  input  logic           reset,
  input  logic           jmp,
  input  logic [7:0]     target,
  input  logic           wrpg,             // PG is written this cycle
  input  logic [PGW-1:0] pg,
  output logic [PAW-1:0] pc
);

  logic [7:0] pc_lo;

  always_ff @(posedge clk or posedge reset)
    if (reset)    pc_lo <= 8'd0;
    else if (jmp) pc_lo <= target;
    else          pc_lo <= pc_lo + 8'd1;

  if (PAW > 8) begin : g_page
    logic [PAW-9:0] pc_hi;
    logic           ljmp;
    logic [PAW-9:0] pg_page;

    // PG bits beyond its width read as zero
    always_comb begin
      pg_page = '0;
      for (int i = 0; i < PAW - 8; i++)
        if (i < PGW) pg_page[i] = pg[i];
    end

    always_ff @(posedge clk or posedge reset)
      if (reset) ljmp <= 1'b0;
      else       ljmp <= wrpg;

    always_ff @(posedge clk or posedge reset)
      if (reset)            pc_hi <= '0;
      else if (jmp && ljmp) pc_hi <= pg_page;
      else if (!jmp && (pc_lo == 8'hFF))
                            pc_hi <= pc_hi + 1'b1;

    assign pc = {pc_hi, pc_lo};
  end else begin : g_flat
    assign pc = pc_lo;
  end

endmodule
