// pc_interface - register file for the user settings.
//
// The PC link (USB on the prototype board) writes 16-bit words to 7-bit
// addresses. Addresses 0x00-0x06 hold the settings the generator exposes:
// linearization enable, signal amplitude, noise level, noise clock divider and
// the three channel delays (see tmap_pkg for the map and reset values).
// Addresses 0x40-0x7F write the 64 entries of the waveform table, so a new
// spike shape (other A, B, n of the template formula, computed on the PC) can
// be loaded without rebuilding the design; the write is passed straight to the
// table in the same clock. Reads are combinational: rdata shows the register
// at 'addr' (table entries read back as 0). Which settings exist follows the
// specification; the map, widths and reset values are this design's choice.
module pc_interface
  import tmap_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        we,
  input  logic [6:0]  addr,
  input  logic [15:0] wdata,
  output logic [15:0] rdata,
  output cfg_t        cfg,
  output logic        tab_we,
  output logic [5:0]  tab_addr,
  output logic [11:0] tab_wdata
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cfg.lin_en      <= 1'b1;
      cfg.amp         <= RST_AMP;
      cfg.noise_level <= RST_NOISE_LEVEL;
      cfg.noise_div   <= RST_NOISE_DIV;
      cfg.delay1      <= RST_DELAY1;
      cfg.delay2      <= RST_DELAY2;
      cfg.delay3      <= RST_DELAY3;
    end else if (we) begin
      unique case (addr)
        REG_CTRL:        cfg.lin_en      <= wdata[0];
        REG_AMP:         cfg.amp         <= wdata[7:0];
        REG_NOISE_LEVEL: cfg.noise_level <= wdata[7:0];
        REG_NOISE_DIV:   cfg.noise_div   <= wdata[7:0];
        REG_DELAY1:      cfg.delay1      <= wdata;
        REG_DELAY2:      cfg.delay2      <= wdata;
        REG_DELAY3:      cfg.delay3      <= wdata;
        default: ;
      endcase
    end
  end

  always_comb begin
    unique case (addr)
      REG_CTRL:        rdata = {15'd0, cfg.lin_en};
      REG_AMP:         rdata = {8'd0, cfg.amp};
      REG_NOISE_LEVEL: rdata = {8'd0, cfg.noise_level};
      REG_NOISE_DIV:   rdata = {8'd0, cfg.noise_div};
      REG_DELAY1:      rdata = cfg.delay1;
      REG_DELAY2:      rdata = cfg.delay2;
      REG_DELAY3:      rdata = cfg.delay3;
      default:         rdata = '0;
    endcase
  end

  assign tab_we    = we && (addr >= REG_TABLE_BASE);
  assign tab_addr  = addr[5:0];
  assign tab_wdata = wdata[11:0];

endmodule
