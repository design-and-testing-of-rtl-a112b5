// i2c_regs: I2C slave giving access to the FF-TC1 configuration and status
// registers.
//
// SCL and SDA are sampled with the system clock (two-flop synchronizers,
// so the clock must be well above the bus bit rate). Protocol: START, 7-bit
// device address ADDR with R/W bit, then for a write a register pointer byte
// followed by data bytes, for a read data bytes from the current pointer;
// the pointer increments after every data byte; every byte is acknowledged
// by the receiver; STOP or a repeated START ends a transfer. sda_oe = 1
// pulls SDA low (open drain).
// Registers 0..NCFG-1 are configuration registers, each kept in five copies
// with 3-of-5 voting (mmr5_reg) against double event upsets; registers
// 16..16+NST-1 are read-only status bytes from st. Other addresses read 0.
// The address, register map and byte protocol are this design's choices.
module i2c_regs #(
  parameter logic [6:0] ADDR = 7'h3A,
  parameter int         NCFG = 4,
  parameter int         NST  = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              scl,
  input  logic              sda_in,
  output logic              sda_oe,
  output logic [NCFG*8-1:0] cfg,
  input  logic [NST*8-1:0]  st,
  output logic              cfg_mism
);
  typedef enum logic [2:0] {S_IDLE, S_ADDR, S_AACK, S_WR, S_WACK, S_RD, S_RACK} st_e;

  logic [2:0] scl_s, sda_s;
  logic scl_r, scl_f, start, stop;
  st_e  s;
  logic [7:0] sh, ptr;
  logic [3:0] bitc;
  logic       rw, ptr_set, oe;
  logic [NCFG-1:0] we, mm;
  logic [7:0] wdat;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scl_s <= 3'b111; sda_s <= 3'b111;
    end else begin
      scl_s <= {scl_s[1:0], scl};
      sda_s <= {sda_s[1:0], sda_in};
    end
  end
  assign scl_r = (scl_s[2:1] == 2'b01);
  assign scl_f = (scl_s[2:1] == 2'b10);
  assign start = scl_s[1] && scl_s[2] && (sda_s[2:1] == 2'b10);
  assign stop  = scl_s[1] && scl_s[2] && (sda_s[2:1] == 2'b01);

  function automatic logic [7:0] rd_byte(input logic [7:0] a);
    if (int'(a) < NCFG) return cfg[a*8 +: 8];
    if (int'(a) >= 16 && int'(a) < 16 + NST) return st[(a-16)*8 +: 8];
    return 8'h00;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s <= S_IDLE; sh <= '0; ptr <= '0; bitc <= '0; rw <= 1'b0; ptr_set <= 1'b0; oe <= 1'b0;
      we <= '0; wdat <= '0;
    end else begin
      we <= '0;
      if (start) begin
        s <= S_ADDR; bitc <= '0; oe <= 1'b0; ptr_set <= 1'b0;
      end else if (stop) begin
        s <= S_IDLE; oe <= 1'b0;
      end else begin
        case (s)
          S_IDLE: oe <= 1'b0;
          S_ADDR: if (scl_r) begin
                    sh <= {sh[6:0], sda_s[1]};
                    bitc <= bitc + 4'd1;
                  end else if (scl_f && bitc == 4'd8) begin
                    if (sh[7:1] == ADDR) begin
                      rw <= sh[0]; oe <= 1'b1; s <= S_AACK;
                    end else s <= S_IDLE;
                  end
          S_AACK: if (scl_f) begin
                    bitc <= '0;
                    if (rw) begin
                      sh <= rd_byte(ptr); oe <= !rd_byte(ptr)[7]; s <= S_RD;
                    end else begin
                      oe <= 1'b0; s <= S_WR;
                    end
                  end
          S_WR:   if (scl_r) begin
                    sh <= {sh[6:0], sda_s[1]};
                    bitc <= bitc + 4'd1;
                  end else if (scl_f && bitc == 4'd8) begin
                    oe <= 1'b1; s <= S_WACK;
                    if (!ptr_set) begin
                      ptr <= sh; ptr_set <= 1'b1;
                    end else begin
                      for (int i = 0; i < NCFG; i++) if (int'(ptr) == i) we[i] <= 1'b1;
                      wdat <= sh;
                      ptr <= ptr + 8'd1;
                    end
                  end
          S_WACK: if (scl_f) begin
                    oe <= 1'b0; bitc <= '0; s <= S_WR;
                  end
          S_RD:   if (scl_f) begin
                    if (bitc == 4'd7) begin
                      oe <= 1'b0; s <= S_RACK; ptr <= ptr + 8'd1;
                    end else begin
                      bitc <= bitc + 4'd1;
                      sh <= {sh[6:0], 1'b0};
                      oe <= !sh[6];
                    end
                  end
          S_RACK: if (scl_r) begin
                    rw <= sda_s[1];   // 1 = master NACK
                  end else if (scl_f) begin
                    if (rw) s <= S_IDLE;
                    else begin
                      bitc <= '0; sh <= rd_byte(ptr); oe <= !rd_byte(ptr)[7]; s <= S_RD;
                    end
                  end
          default: s <= S_IDLE;
        endcase
      end
    end
  end
  assign sda_oe = oe;

  for (genvar i = 0; i < NCFG; i++) begin : g_cfg
    mmr5_reg #(.W(8)) u_r (.clk(clk), .rst_n(rst_n), .we(we[i]), .d(wdat), .q(cfg[i*8 +: 8]),
      .mism(mm[i]), .seu(5'b0), .seu_mask('0));
  end
  assign cfg_mism = |mm;
endmodule
