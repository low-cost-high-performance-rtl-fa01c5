// serial_interface: 3-wire serial port and register bank.
//
// The external processor programs the operating conditions and reads the
// state over SCK, SDA and SEN. A transfer is framed by SEN high and is 24
// SCK periods long, most significant bit first, with SDA sampled on the
// rising edge of SCK: one read/write bit (1 = read), a 7-bit register
// address, then 16 data bits. On a write the register is updated after the
// 24th bit. On a read the port drives SDA (sda_oe high) from the falling
// SCK edge after the address, changing it on each falling edge, so the
// processor samples it on the rising edges. SCK, SDA and SEN are
// synchronized to clk and must be slower than clk/4. Registers follow
// reg_addr_e in tdd_pkg; unknown addresses read 0 and ignore writes. The
// document names the three pins and the block's task; the frame format,
// the polarity of SEN and the register map are this design's.
module serial_interface
  import tdd_pkg::*;
#(
  parameter int unsigned T_DIG_DEF = 50,
  parameter int unsigned T_RF_DEF  = 0,
  parameter int unsigned T_GEN_DEF = 19
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    sck,
  input  logic    sen,
  input  logic    sda_i,
  output logic    sda_o,
  output logic    sda_oe,
  input  status_t status,
  output cfg_t    cfg
);
  logic [2:0] sck_s;
  logic [1:0] sen_s, sda_s;
  logic sck_rise, sck_fall, active;
  logic [4:0]  bitcnt;
  logic [22:0] shin;
  logic [15:0] shout;
  logic [15:0] rdata;
  logic        is_read;
  logic [6:0]  addr;

  always_comb begin
    sck_rise = sck_s[1] & ~sck_s[2];
    sck_fall = ~sck_s[1] & sck_s[2];
    active   = sen_s[1];
    addr     = shin[6:0];
    case (addr)
      REG_CTRL:      rdata = {15'b0, cfg.enable};
      REG_T_DIG:     rdata = cfg.t_dig;
      REG_T_RF:      rdata = cfg.t_rf;
      REG_T_GEN:     rdata = cfg.t_gen;
      REG_TRIM_ALL:  rdata = cfg.trim_all;
      REG_TRIM_RISE: rdata = cfg.trim_rise;
      REG_TRIM_FALL: rdata = cfg.trim_fall;
      REG_STATUS:    rdata = {12'b0, status.locked, status.mode_valid, status.mode};
      REG_MEAS_HIGH: rdata = status.meas_high;
      REG_MEAS_PER:  rdata = status.meas_period;
      REG_T_DELAY:   rdata = status.t_delay;
      REG_RESYNCS:   rdata = {8'b0, status.resyncs};
      default:       rdata = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sck_s   <= '0;
      sen_s   <= '0;
      sda_s   <= '0;
      bitcnt  <= '0;
      shin    <= '0;
      shout   <= '0;
      is_read <= 1'b0;
      sda_o   <= 1'b0;
      sda_oe  <= 1'b0;
      cfg.enable    <= 1'b1;
      cfg.t_dig     <= us_t'(T_DIG_DEF);
      cfg.t_rf      <= us_t'(T_RF_DEF);
      cfg.t_gen     <= us_t'(T_GEN_DEF);
      cfg.trim_all  <= '0;
      cfg.trim_rise <= '0;
      cfg.trim_fall <= '0;
    end else begin
      sck_s <= {sck_s[1:0], sck};
      sen_s <= {sen_s[0], sen};
      sda_s <= {sda_s[0], sda_i};
      if (!active) begin
        bitcnt <= '0;
        sda_oe <= 1'b0;
      end else begin
        if (sck_rise && bitcnt != 5'd24) begin
          shin   <= {shin[21:0], sda_s[1]};
          bitcnt <= bitcnt + 1'b1;
          if (bitcnt == 5'd0) is_read <= sda_s[1];
          if (bitcnt == 5'd23 && !is_read) begin
            case (shin[21:15])
              REG_CTRL:      cfg.enable    <= sda_s[1];
              REG_T_DIG:     cfg.t_dig     <= {shin[14:0], sda_s[1]};
              REG_T_RF:      cfg.t_rf      <= {shin[14:0], sda_s[1]};
              REG_T_GEN:     cfg.t_gen     <= {shin[14:0], sda_s[1]};
              REG_TRIM_ALL:  cfg.trim_all  <= {shin[14:0], sda_s[1]};
              REG_TRIM_RISE: cfg.trim_rise <= {shin[14:0], sda_s[1]};
              REG_TRIM_FALL: cfg.trim_fall <= {shin[14:0], sda_s[1]};
              default: ;
            endcase
          end
        end
        if (sck_fall && is_read && bitcnt == 5'd8) begin
          // address complete: present the register, MSB first
          sda_oe <= 1'b1;
          sda_o  <= rdata[15];
          shout  <= {rdata[14:0], 1'b0};
        end else if (sck_fall && is_read && bitcnt > 5'd8 && bitcnt < 5'd24) begin
          sda_o  <= shout[15];
          shout  <= {shout[14:0], 1'b0};
        end
      end
    end
  end
endmodule
