// host_bus: memory-mapped bus between the processor and the SEMETS units. The processor
// side is a simple word interface: wr_en or rd_en with a 20-bit word address; read data
// returns with rvalid one cycle later (the unit's register). addr[19:16] selects the unit,
// addr[15:0] is the word address inside it. Unit number 4'hF is a broadcast: a write there
// goes to every unit at once, which starts all subsystems in the same cycle.
// The document connects the processor and the units through an AXI bus; this module gives
// the address decoding and read multiplexing that bus performs, without the AXI channel
// handshakes, which are a vendor interface rather than part of the design.
module host_bus #(
  parameter int unsigned NS = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr_en,
  input  logic        rd_en,
  input  logic [19:0] addr,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  output logic        rvalid,
  output logic [NS-1:0] s_wr,
  output logic [NS-1:0] s_rd,
  output logic [15:0]   s_addr,
  output logic [31:0]   s_wdata,
  input  logic [31:0]   s_rdata  [NS],
  input  logic [NS-1:0] s_rvalid
);
  localparam logic [3:0] BCAST = 4'hF;
  logic [3:0] sel, sel_q;
  assign sel     = addr[19:16];
  assign s_addr  = addr[15:0];
  assign s_wdata = wdata;

  always_comb begin
    for (int i = 0; i < NS; i++) begin
      s_wr[i] = wr_en && (sel == 4'(i) || sel == BCAST);
      s_rd[i] = rd_en && (sel == 4'(i));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sel_q <= '0;
    else if (rd_en) sel_q <= sel;
  end

  always_comb begin
    rvalid = 1'b0;
    rdata  = '0;
    for (int i = 0; i < NS; i++)
      if (sel_q == 4'(i) && s_rvalid[i]) begin
        rvalid = 1'b1;
        rdata  = s_rdata[i];
      end
  end

  // a read addressed to no unit would never return data
  a_read_decodes : assert property (@(posedge clk) disable iff (!rst_n)
                                    rd_en |-> sel < 4'(NS));
endmodule
