// ipbus_pkg: IndustryPack address spaces, for the carrier model in ipbus_if.
package ipbus_pkg;
  typedef enum {IO, MEM, ID, INT} space_e;
endpackage
